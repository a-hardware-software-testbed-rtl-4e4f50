// tb_capture_ctrl: self-checking test of the sampling controller.
// Checks that after a request exactly cap_len of the offered samples, in
// order, go to the FIFO, that done toggles once, that samples meeting a full
// FIFO are counted as dropped, and that nothing is written without a request.
`timescale 1ns/1ps
module tb_capture_ctrl;
  import testbed_pkg::*;
  logic clk = 0, rst_n = 1;
  always #25 clk = ~clk;
  logic req_tog = 0, done_tog, busy, s_valid = 0, fifo_wr_en, fifo_full = 0;
  logic [15:0] cap_len = 0, dropped;
  logic [WORD_W-1:0] s_data = 0, fifo_wr_data;

  capture_ctrl dut (.*);

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

  logic [WORD_W-1:0] wrote[$];
  always @(posedge clk) if (fifo_wr_en) wrote.push_back(fifo_wr_data);
  // source: a counter, valid on two cycles of three
  int sc = 0;
  always @(negedge clk) begin
    s_valid = (sc % 3) != 2; s_data = WORD_W'(sc); sc++;
  end

  initial begin
    logic d0;
    logic [WORD_W-1:0] first;
    #1 rst_n = 0; #100 rst_n = 1;
    repeat (50) @(posedge clk);
    check(wrote.size() == 0, "idle writes nothing");
    cap_len = 16'd100; d0 = done_tog;
    req_tog = ~req_tog;
    wait (busy);
    wait (!busy);
    repeat (3) @(posedge clk);
    check(wrote.size() == 100, $sformatf("wrote %0d", wrote.size()));
    check(done_tog != d0, "done toggled");
    first = wrote[0];
    for (int i = 1; i < wrote.size(); i++)
      check(wrote[i] == wrote[i-1] + 1 || wrote[i] == wrote[i-1] + 2, "consecutive samples");
    check(wrote[99] - first <= 150, "no samples skipped");
    // full FIFO for part of the run
    wrote = {}; cap_len = 16'd60;
    req_tog = ~req_tog;
    wait (busy);
    repeat (10) @(posedge clk);
    fifo_full = 1;
    repeat (6) @(posedge clk);
    fifo_full = 0;
    wait (!busy);
    check(dropped > 0 && wrote.size() + int'(dropped) == 60,
          $sformatf("wrote %0d dropped %0d", wrote.size(), dropped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
