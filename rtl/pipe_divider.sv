// pipe_divider: fully pipelined unsigned restoring divider, one result per
// clock. Stage i decides quotient bit Q_W-1-i by comparing the remainder with
// the divisor shifted left by that bit. A quotient that would not fit in Q_W
// bits saturates to all ones; a zero divisor gives zero. A tag travels with
// each operand pair. Latency: Q_W + 1 clock cycles from in_valid to
// out_valid.
module pipe_divider #(
  parameter int unsigned NUM_W = 48,
  parameter int unsigned DEN_W = 37,
  parameter int unsigned Q_W   = 16,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NUM_W-1:0] in_num,
  input  logic [DEN_W-1:0] in_den,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [Q_W-1:0]   out_quo,
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned RW = (NUM_W > DEN_W + Q_W) ? NUM_W : DEN_W + Q_W;

  logic             v   [Q_W+1];
  logic [RW-1:0]    rem [Q_W+1];
  logic [DEN_W-1:0] den [Q_W+1];
  logic [Q_W-1:0]   quo [Q_W+1];
  logic             sat [Q_W+1];
  logic [TAG_W-1:0] tag [Q_W+1];

  // stage 0: register operands and decide saturation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  end
  always_ff @(posedge clk) begin
    rem[0] <= RW'(in_num);
    den[0] <= in_den;
    quo[0] <= '0;
    sat[0] <= (in_den == '0) ? 1'b0 : (RW'(in_num) >= (RW'(in_den) << Q_W));
    tag[0] <= in_tag;
  end

  for (genvar s = 0; s < Q_W; s++) begin : g_stage
    localparam int unsigned B = Q_W - 1 - s;
    logic [RW-1:0] dsh;
    assign dsh = RW'(den[s]) << B;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[s+1] <= 1'b0;
      else        v[s+1] <= v[s];
    end
    always_ff @(posedge clk) begin
      den[s+1] <= den[s];
      sat[s+1] <= sat[s];
      tag[s+1] <= tag[s];
      if (den[s] != '0 && rem[s] >= dsh) begin
        rem[s+1] <= rem[s] - dsh;
        quo[s+1] <= quo[s] | (Q_W'(1) << B);
      end else begin
        rem[s+1] <= rem[s];
        quo[s+1] <= quo[s];
      end
    end
  end

  assign out_valid = v[Q_W];
  assign out_quo   = sat[Q_W] ? '1 : quo[Q_W];
  assign out_tag   = tag[Q_W];
endmodule
