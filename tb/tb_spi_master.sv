// tb_spi_master: self-checking test of the RF configuration SPI master.
// An SPI slave model (mode 0) records MOSI on rising SCLK and shifts out its
// own byte on MISO. Checks the bytes both ways, chip select, the register
// read-back and the transfer time of 17 * (DIV + 1) clocks.
`timescale 1ns/1ps
module tb_spi_master;
  logic clk = 0, rst_n = 1;
  always #31 clk = ~clk;
  logic bus_sel = 0, bus_we = 0; logic [1:0] bus_addr = 0; logic [7:0] bus_wdata = 0, bus_rdata;
  logic sclk, mosi, miso, cs_n, busy;

  spi_master dut (.clk, .rst_n, .bus_sel, .bus_addr, .bus_wdata, .bus_we, .bus_rdata,
                  .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso), .spi_cs_n(cs_n), .busy);

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

  // slave model
  logic [7:0] slave_in = 0, slave_out = 0; int rises = 0;
  assign miso = slave_out[7];
  always @(posedge sclk) if (!cs_n) begin slave_in = {slave_in[6:0], mosi}; rises++; end
  always @(negedge sclk) if (!cs_n) slave_out = {slave_out[6:0], 1'b0};

  task automatic wr(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk); bus_sel = 1; bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0; bus_sel = 0;
  endtask

  initial begin
    int t0, t1;
    #1 rst_n = 0; #100 rst_n = 1;
    check(cs_n, "CS idle high");
    for (int div = 1; div <= 4; div += 3) begin
      wr(2'd2, 8'(div));
      wr(2'd1, 8'h01);
      check(!cs_n, "CS asserted");
      for (int n = 0; n < 3; n++) begin
        logic [7:0] m = 8'($urandom), s = 8'($urandom);
        slave_out = s; rises = 0;
        wr(2'd0, m);
        t0 = $time;
        @(negedge clk);
        while (busy) @(negedge clk);
        t1 = $time;
        check(slave_in == m, $sformatf("slave got %h want %h", slave_in, m));
        check(rises == 8, "eight SCLK pulses");
        bus_addr = 2'd0; #1;
        check(bus_rdata == s, $sformatf("master got %h want %h", bus_rdata, s));
        check((t1 - t0) / 62 >= 17 * (div + 1) && (t1 - t0) / 62 <= 17 * (div + 1) + 2,
              $sformatf("transfer took %0d clocks", (t1 - t0) / 62));
      end
      wr(2'd1, 8'h00);
      check(cs_n, "CS released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
