// tb_async_fifo: self-checking test of the dual-clock sample FIFO.
// Phase 1 fills a 16-word FIFO with no reads and checks that exactly 16 words
// are accepted and that full rises; phase 2 drains it and checks order and
// empty; phase 3 runs random writes and reads on unrelated clocks against a
// queue model.
module tb_async_fifo;
  localparam int unsigned DW = 32, AW = 4, DEPTH = 1 << AW;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  logic wr_en = 0, rd_en = 0;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic wr_full, rd_empty;
  logic [AW:0] wr_count, rd_count;
  int checks = 0, failures = 0;
  logic [DW-1:0] model[$];

  always #7 wclk = ~wclk;
  always #5 rclk = ~rclk;

  async_fifo #(.DATA_W(DW), .ADDR_W(AW)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .wr_data, .wr_full, .wr_count,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data, .rd_empty, .rd_count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader: pops whenever rd_en is high and data is present, compares with model
  always @(posedge rclk) begin
    if (rrst_n && rd_en && !rd_empty) begin
      check(model.size() > 0 && rd_data == model[0], $sformatf("read order, got %h", rd_data));
      if (model.size() > 0) void'(model.pop_front());
    end
  end

  initial begin
    int accepted, popped;
    #1 wrst_n = 0; rrst_n = 0;
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge wclk);
    check(rd_empty && !wr_full, "empty after reset");
    // phase 1: fill
    accepted = 0;
    for (int i = 0; i < DEPTH + 5; i++) begin
      @(negedge wclk);
      wr_data = $urandom; wr_en = 1;
      @(posedge wclk);
      if (!wr_full) begin accepted++; model.push_back(wr_data); end
    end
    @(negedge wclk) wr_en = 0;
    check(accepted == DEPTH, $sformatf("accepted %0d words", accepted));
    check(wr_full, "full after filling");
    // phase 2: drain
    repeat (6) @(posedge rclk);
    check(rd_count == DEPTH, "read side count");
    @(negedge rclk) rd_en = 1;
    wait (rd_empty);
    @(negedge rclk) rd_en = 0;
    check(model.size() == 0, "all words read");
    repeat (6) @(posedge wclk);
    check(!wr_full && wr_count == 0, "write side sees empty");
    // phase 3: random traffic
    fork
      begin
        for (int i = 0; i < 3000; i++) begin
          @(negedge wclk);
          wr_en = ($urandom % 3) != 0; wr_data = $urandom;
          @(posedge wclk);
          if (wr_en && !wr_full) model.push_back(wr_data);
        end
        @(negedge wclk) wr_en = 0;
      end
      begin
        for (int i = 0; i < 5000; i++) begin
          @(negedge rclk); rd_en = ($urandom % 2) != 0;
        end
        @(negedge rclk) rd_en = 1;
      end
    join
    repeat (40) @(posedge rclk);
    check(rd_empty && model.size() == 0, "drained after random traffic");
    popped = checks;
    check(popped > 1000, "enough reads compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
