// tb_playout_ctrl: self-checking test of the transmit sample player.
// A queue stands in for the Tx FIFO. Checks that after a request play_len
// samples go to the DAC on consecutive clocks in FIFO order, that the DAC is
// silent otherwise, and that an empty FIFO counts underruns.
`timescale 1ns/1ps
module tb_playout_ctrl;
  import testbed_pkg::*;
  logic clk = 0, rst_n = 1;
  always #25 clk = ~clk;
  logic req_tog = 0, done_tog, busy, fifo_rd_en, fifo_empty, dac_valid;
  logic [15:0] play_len = 0, underruns;
  logic [WORD_W-1:0] fifo_rd_data;
  logic [ADC_W-1:0] dac_i, dac_q;

  playout_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WORD_W-1:0] q[$], sent[$];
  assign fifo_empty   = q.size() == 0;
  assign fifo_rd_data = fifo_empty ? '0 : q[0];
  always @(posedge clk) if (fifo_rd_en && !fifo_empty) begin #1 void'(q.pop_front()); end

  logic [2*ADC_W-1:0] dac[$]; int valid_cycles = 0, first_v = -1, last_v = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dac_valid) begin
      dac.push_back({dac_i, dac_q}); valid_cycles++;
      if (first_v < 0) first_v = cyc;
      last_v = cyc;
    end else check(dac_i == 0 && dac_q == 0, "DAC zero when idle");
  end

  initial begin
    #1 rst_n = 0; #100 rst_n = 1;
    for (int i = 0; i < 80; i++) begin
      logic [WORD_W-1:0] w = $urandom;
      q.push_back(w); sent.push_back(w);
    end
    repeat (20) @(posedge clk);
    check(valid_cycles == 0 && q.size() == 80, "idle until requested");
    play_len = 16'd80;
    req_tog = ~req_tog;
    wait (busy); wait (!busy);
    repeat (3) @(posedge clk);
    check(valid_cycles == 80, $sformatf("played %0d", valid_cycles));
    check(last_v - first_v == 79, "one sample per clock");
    for (int i = 0; i < 80 && i < dac.size(); i++)
      check(dac[i] == {sent[i][SAMPLE_W +: ADC_W], sent[i][0 +: ADC_W]}, $sformatf("sample %0d", i));
    check(underruns == 0, "no underrun");
    // underrun: play 10 with 4 in the FIFO
    for (int i = 0; i < 4; i++) q.push_back($urandom);
    play_len = 16'd10; req_tog = ~req_tog;
    wait (busy); wait (!busy);
    check(underruns == 6, $sformatf("underruns %0d", underruns));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
