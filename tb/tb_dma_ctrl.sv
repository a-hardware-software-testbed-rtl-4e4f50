// tb_dma_ctrl: self-checking test of the DMA controller and its registers.
// The MAC and both FIFOs are modelled here with queues. Checks: header plus
// payload streamed to the MAC in order with the last byte marked, a stall on
// an empty Rx FIFO, the sticky status flags, reception of a header into the
// header buffer and of the UDP payload (padding excluded) into the Tx FIFO,
// frames ignored when not armed, overflow on a full Tx FIFO, the sampling
// handshake and the configuration register.
`timescale 1ns/1ps
module tb_dma_ctrl;
  import testbed_pkg::*;
  logic clk = 0, rst_n = 1;
  always #31 clk = ~clk;

  logic [7:0] bus_addr = 0, bus_wdata = 0, bus_rdata; logic bus_we = 0;
  logic [7:0] mac_tx_data; logic mac_tx_valid, mac_tx_last, mac_tx_ready = 0;
  logic mac_tx_done = 0, mac_tx_abort = 0;
  logic [7:0] mac_rx_data = 0; logic mac_rx_valid = 0, mac_rx_eof = 0, mac_rx_good = 0;
  logic rxf_rd_en; logic [31:0] rxf_data; logic rxf_empty; logic [12:0] rxf_count;
  logic txf_wr_en; logic [31:0] txf_data; logic txf_full = 0;
  logic full_duplex; logic [1:0] rx_src; logic cap_req_tog, cap_done_tog = 0, tx_stall;
  logic play_req_tog, play_done_tog = 0; logic [15:0] play_len;
  logic [15:0] cap_len;

  dma_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Rx FIFO model
  logic [31:0] rxq[$];
  assign rxf_empty = rxq.size() == 0;
  assign rxf_data  = rxf_empty ? 32'h0 : rxq[0];
  assign rxf_count = 13'(rxq.size());
  int pops = 0, stall_cycles = 0;
  always @(posedge clk) if (tx_stall) stall_cycles++;
  always @(posedge clk) if (rxf_rd_en && !rxf_empty) begin #1 void'(rxq.pop_front()); pops++; end

  // MAC transmit model: random ready, records bytes
  logic [7:0] mac_got[$]; int lasts = 0; int last_at = -1;
  always @(posedge clk) begin
    if (mac_tx_valid && mac_tx_ready) begin
      mac_got.push_back(mac_tx_data);
      if (mac_tx_last) begin lasts++; last_at = mac_got.size(); end
    end
  end
  always @(negedge clk) mac_tx_ready = ($urandom % 4) != 0;

  // Tx FIFO model
  logic [31:0] txq[$];
  always @(posedge clk) if (txf_wr_en) txq.push_back(txf_data);

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    @(negedge clk); bus_addr = a; #1 d = bus_rdata;
  endtask
  task automatic rx_frame(input logic [7:0] f[$], input bit good);
    foreach (f[i]) begin
      @(negedge clk); mac_rx_data = f[i]; mac_rx_valid = 1;
      @(negedge clk); mac_rx_valid = 0;
      repeat (2) @(negedge clk);
    end
    @(negedge clk); mac_rx_eof = 1; mac_rx_good = good;
    @(negedge clk); mac_rx_eof = 0;
  endtask

  initial begin
    logic [7:0] hdr[$], d, f[$];
    logic [31:0] words[$];
    #1 rst_n = 0;
    #200 rst_n = 1;
    // ---------- configuration ----------
    rd(8'h02, d); check(d == 8'h01, "CFG reset value");
    rd(8'h03, d); check(d == 8'd42, "HDR_LEN reset value");
    wr(8'h02, 8'h04); rd(8'h02, d);
    check(d == 8'h04 && rx_src == 2'd2 && !full_duplex, "CFG write");
    wr(8'h02, 8'h01);
    // ---------- transmit: header + 5 words, FIFO starts with 3 ----------
    for (int i = 0; i < 42; i++) begin hdr.push_back(8'($urandom)); wr(8'h40 + 8'(i), hdr[i]); end
    for (int i = 0; i < 5; i++) words.push_back($urandom);
    for (int i = 0; i < 3; i++) rxq.push_back(words[i]);
    wr(8'h04, 8'd5); wr(8'h05, 8'd0);
    wr(8'h00, 8'h01);
    repeat (400) @(posedge clk);
    check(tx_stall, "stalled on empty Rx FIFO");
    rxq.push_back(words[3]); rxq.push_back(words[4]);
    repeat (100) @(posedge clk);
    check(mac_got.size() == 62, $sformatf("bytes to MAC %0d", mac_got.size()));
    for (int i = 0; i < 42; i++) check(mac_got[i] == hdr[i], "header byte");
    for (int w = 0; w < 5; w++)
      check({mac_got[42+4*w], mac_got[43+4*w], mac_got[44+4*w], mac_got[45+4*w]} == words[w],
            $sformatf("payload word %0d", w));
    check(lasts == 1 && last_at == 62, "last marks the final byte");
    check(pops == 5, "five words popped");
    rd(8'h01, d); check(d[0] && !d[1], "busy until the MAC reports");
    @(negedge clk) mac_tx_done = 1; @(negedge clk) mac_tx_done = 0;
    rd(8'h01, d); check(!d[0] && d[1], "TX_DONE set");
    wr(8'h00, 8'h80); rd(8'h01, d); check(!d[1], "flags cleared");
    // ---------- receive an armed frame: header, 12 payload bytes, 6 pad ----------
    f = {};
    for (int i = 0; i < 42; i++) f.push_back(8'($urandom));
    f[38] = 8'd0; f[39] = 8'd20;   // UDP length = 8 + 12
    words = {};
    for (int w = 0; w < 3; w++) begin
      words.push_back($urandom);
      for (int b = 3; b >= 0; b--) f.push_back(words[w][8*b +: 8]);
    end
    for (int i = 0; i < 6; i++) f.push_back(8'hEE);
    wr(8'h00, 8'h02);
    rd(8'h01, d); check(d[5], "RX_ARMED");
    rx_frame(f, 1'b1);
    repeat (3) @(posedge clk);
    rd(8'h01, d); check(d[3] && d[4] && !d[5], "RX_DONE and RX_GOOD");
    rd(8'h06, d); check(d == 8'd12, $sformatf("RX_BYTES %0d", d));
    check(txq.size() == 3, $sformatf("words into Tx FIFO %0d", txq.size()));
    for (int w = 0; w < 3 && w < txq.size(); w++) check(txq[w] == words[w], "rx payload word");
    for (int i = 0; i < 42; i++) begin rd(8'h40 + 8'(i), d); check(d == f[i], "rx header byte"); end
    // ---------- not armed: ignored ----------
    wr(8'h00, 8'h80); txq = {};
    rx_frame(f, 1'b1);
    rd(8'h01, d); check(!d[3] && txq.size() == 0, "unarmed frame ignored");
    // ---------- overflow ----------
    txf_full = 1;
    wr(8'h00, 8'h02);
    rx_frame(f, 1'b0);
    rd(8'h01, d); check(d[7] && d[3] && !d[4], "RX_OVF and bad CRC reported");
    check(txq.size() == 0, "nothing written to a full FIFO");
    txf_full = 0;
    // ---------- sampling handshake ----------
    wr(8'h08, 8'h34); wr(8'h09, 8'h12);
    check(cap_len == 16'h1234, "CAP_LEN");
    d = {7'd0, cap_req_tog};
    wr(8'h00, 8'h04);
    check(cap_req_tog != d[0], "request toggled");
    rd(8'h01, d); check(d[6], "CAP_BUSY");
    repeat (5) @(posedge clk);
    cap_done_tog = ~cap_done_tog;
    repeat (5) @(posedge clk);
    rd(8'h01, d); check(!d[6], "capture finished");
    // ---------- playback handshake ----------
    wr(8'h0C, 8'h70); wr(8'h0D, 8'h08);
    check(play_len == 16'h0870, "PLAY_LEN");
    d = {7'd0, play_req_tog};
    wr(8'h00, 8'h08);
    check(play_req_tog != d[0], "play request toggled");
    rd(8'h0E, d); check(d[0], "PLAY_BUSY");
    repeat (5) @(posedge clk);
    play_done_tog = ~play_done_tog;
    repeat (5) @(posedge clk);
    rd(8'h0E, d); check(!d[0], "playback finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
