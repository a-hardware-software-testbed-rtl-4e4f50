// tb_eth_mac: self-checking test of the MII Ethernet MAC.
// A PHY model records the transmitted nibbles and can play nibbles back into
// the receiver. Checks: preamble/SFD, payload, zero padding to 60 bytes and
// the FCS against a bitwise CRC-32 written here; reception of a good frame
// and rejection of a corrupted one; deferral under carrier sense; jam,
// backoff and resend after a collision in half duplex.
`timescale 1ns/1ps
module tb_eth_mac;
  logic clk = 0, rst_n = 1;
  logic tx_clk = 0, rx_clk = 0;
  always #31 clk = ~clk;          // ~16 MHz system clock
  always #200 tx_clk = ~tx_clk;   // 2.5 MHz MII clocks
  always #200 rx_clk = ~rx_clk;

  logic full_duplex = 1;
  logic [7:0] tx_data = 0; logic tx_valid = 0, tx_last = 0, tx_ready;
  logic tx_busy, tx_done, tx_abort; logic [4:0] tx_attempts;
  logic [7:0] rx_data; logic rx_valid, rx_eof, rx_good;
  logic [3:0] txd, rxd = 0; logic tx_en, rx_dv = 0, rx_er = 0, crs = 0, col = 0;

  eth_mac dut (.clk, .rst_n, .full_duplex,
    .tx_data, .tx_valid, .tx_last, .tx_ready, .tx_busy, .tx_done, .tx_abort, .tx_attempts,
    .rx_data, .rx_valid, .rx_eof, .rx_good,
    .mii_tx_clk(tx_clk), .mii_txd(txd), .mii_tx_en(tx_en),
    .mii_rx_clk(rx_clk), .mii_rxd(rxd), .mii_rx_dv(rx_dv), .mii_rx_er(rx_er),
    .mii_crs(crs), .mii_col(col));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_crc(input logic [7:0] b[$]);
    logic [31:0] c = '1;
    foreach (b[i]) for (int k = 0; k < 8; k++) begin
      logic fb = c[0] ^ b[i][k];
      c = c >> 1;
      if (fb) c ^= 32'hEDB88320;
    end
    return ~c;
  endfunction

  // PHY transmit capture: nibbles sampled on rising TX_CLK while TX_EN
  logic [3:0] cap[$];
  int tx_en_rises = 0;
  logic tx_en_q = 0;
  always @(posedge tx_clk) begin
    if (tx_en) cap.push_back(txd);
    if (tx_en && !tx_en_q) tx_en_rises++;
    tx_en_q <= tx_en;
  end

  // receiver output capture
  logic [7:0] got[$];
  int eofs = 0; logic last_good = 0;
  always @(posedge clk) begin
    if (rx_valid) got.push_back(rx_data);
    if (rx_eof) begin eofs++; last_good = rx_good; end
  end

  task automatic send_frame(input logic [7:0] f[$]);
    foreach (f[i]) begin
      @(negedge clk);
      tx_data = f[i]; tx_valid = 1; tx_last = (i == f.size() - 1);
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
    end
    @(negedge clk) tx_valid = 0; tx_last = 0;
  endtask

  task automatic play_nibbles(input logic [3:0] n[$]);
    foreach (n[i]) begin
      @(posedge rx_clk); #5 rxd = n[i]; rx_dv = 1;
    end
    @(posedge rx_clk); #5 rx_dv = 0; rxd = 0;
    repeat (4) @(posedge rx_clk);
  endtask

  initial begin
    logic [7:0] frame[$], expect_b[$], wire_b[$];
    logic [31:0] fcs;
    logic [3:0] nibs[$];
    #1 rst_n = 0;
    #500 rst_n = 1;
    // ---------- 1: transmit a short frame in full duplex ----------
    frame = {};
    for (int i = 0; i < 20; i++) frame.push_back(8'($urandom));
    send_frame(frame);
    wait (tx_done); @(posedge tx_clk); @(posedge tx_clk);
    expect_b = frame;
    while (expect_b.size() < 60) expect_b.push_back(8'h00);
    fcs = ref_crc(expect_b);
    check(cap.size() == 2 * (8 + 60 + 4), $sformatf("wire length %0d nibbles", cap.size()));
    wire_b = {};
    for (int i = 0; i + 1 < cap.size(); i += 2) wire_b.push_back({cap[i+1], cap[i]});
    for (int i = 0; i < 7; i++) check(wire_b[i] == 8'h55, "preamble");
    check(wire_b[7] == 8'hD5, "SFD");
    for (int i = 0; i < 60; i++)
      check(wire_b[8+i] == expect_b[i], $sformatf("tx byte %0d", i));
    check({wire_b[71], wire_b[70], wire_b[69], wire_b[68]} == fcs, "FCS");
    check(tx_attempts == 1, "one attempt");
    // ---------- 2: receive the same nibbles back ----------
    nibs = cap; got = {};
    play_nibbles(nibs);
    repeat (10) @(posedge clk);
    check(eofs == 1 && last_good, "good frame accepted");
    check(got.size() == 60, $sformatf("rx length %0d", got.size()));
    for (int i = 0; i < 60 && i < got.size(); i++) check(got[i] == expect_b[i], "rx byte");
    // ---------- 3: corrupted frame ----------
    nibs[40] = nibs[40] ^ 4'h1; got = {};
    play_nibbles(nibs);
    repeat (10) @(posedge clk);
    check(eofs == 2 && !last_good, "bad CRC rejected");
    // ---------- 4: deferral under carrier sense (half duplex) ----------
    full_duplex = 0; cap = {};
    crs = 1;
    fork send_frame(frame); join_none
    repeat (200) @(posedge tx_clk);
    check(!tx_en && cap.size() == 0, "deferred while carrier sensed");
    crs = 0;
    wait (tx_done); @(posedge tx_clk);
    check(cap.size() == 144, "sent after carrier dropped");
    // ---------- 5: collision, jam, backoff, resend ----------
    cap = {}; tx_en_rises = 0;
    fork send_frame(frame); join_none
    wait (tx_en);
    repeat (10) @(posedge tx_clk);
    col = 1;
    repeat (4) @(posedge tx_clk);
    col = 0;
    wait (!tx_en);
    check(!tx_done, "no done after collision");
    wait (tx_done); @(posedge tx_clk); @(posedge tx_clk);
    check(tx_attempts == 2, $sformatf("attempts %0d", tx_attempts));
    check(tx_en_rises == 2, "two transmissions");
    // the last 144 nibbles are the complete resent frame
    wire_b = {};
    for (int i = cap.size() - 144; i + 1 < cap.size(); i += 2) wire_b.push_back({cap[i+1], cap[i]});
    check(wire_b[7] == 8'hD5 && {wire_b[71], wire_b[70], wire_b[69], wire_b[68]} == fcs,
          "resent frame intact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
