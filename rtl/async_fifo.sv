// async_fifo: dual-clock FIFO used as the Tx FIFO and the Rx FIFO of the
// baseband processing board.
//
// The baseband modules under test run on a clock of their own while the DMA
// runs on the MCU clock, so both sample buffers cross clock domains. This is
// the usual Gray-code pointer design: each side keeps a binary pointer one bit
// wider than the address, passes its Gray-coded copy through a two-flop
// synchroniser to the other side, and compares there. Full and empty are
// therefore pessimistic by the synchroniser delay and never wrong.
//
// Interface: write side (wr_clk, wr_rst_n, wr_en, wr_data, wr_full,
// wr_count); read side (rd_clk, rd_rst_n, rd_en, rd_data, rd_empty,
// rd_count). rd_data shows the oldest word whenever rd_empty is low
// (show-ahead); rd_en pops it. Writes while full and reads while empty are
// ignored. The counts are the occupancy as each side sees it.
//
// The depth is not given for the testbed; 4096 words is this design's choice,
// enough for one whole reference frame (2160 samples plus the 411-sample gap).
module async_fifo #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 12
) (
  input  logic              wr_clk,
  input  logic              wr_rst_n,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  output logic              wr_full,
  output logic [ADDR_W:0]   wr_count,

  input  logic              rd_clk,
  input  logic              rd_rst_n,
  input  logic              rd_en,
  output logic [DATA_W-1:0] rd_data,
  output logic              rd_empty,
  output logic [ADDR_W:0]   rd_count
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  logic [ADDR_W:0] wbin, wgray, rbin, rgray;
  logic [ADDR_W:0] rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [ADDR_W:0] wgray_r1, wgray_r2;   // write pointer seen by the read side

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [ADDR_W:0] gray2bin(input logic [ADDR_W:0] g);
    logic [ADDR_W:0] b;
    b[ADDR_W] = g[ADDR_W];
    for (int i = int'(ADDR_W) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic do_wr;
  logic [ADDR_W:0] wbin_next, rbin_w;
  assign do_wr     = wr_en && !wr_full;
  assign wbin_next = wbin + (ADDR_W+1)'(do_wr);
  assign rbin_w    = gray2bin(rgray_w2);

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wbin[ADDR_W-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  assign wr_count = wbin - rbin_w;
  assign wr_full  = (wgray == {~rgray_w2[ADDR_W:ADDR_W-1], rgray_w2[ADDR_W-2:0]});

  // ---------------- read side ----------------
  logic do_rd;
  logic [ADDR_W:0] rbin_next, wbin_r;
  assign do_rd     = rd_en && !rd_empty;
  assign rbin_next = rbin + (ADDR_W+1)'(do_rd);
  assign wbin_r    = gray2bin(wgray_r2);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign rd_count = wbin_r - rbin;
  assign rd_empty = (rgray == wgray_r2);
  assign rd_data  = mem[rbin[ADDR_W-1:0]];

  // A write may never land on a full FIFO nor a read on an empty one.
  a_no_overflow:  assert property (@(posedge wr_clk) disable iff (!wr_rst_n) 32'(wr_count) <= DEPTH);
  a_no_underflow: assert property (@(posedge rd_clk) disable iff (!rd_rst_n) 32'(rd_count) <= DEPTH);
endmodule
