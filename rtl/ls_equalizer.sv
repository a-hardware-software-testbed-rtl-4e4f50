// ls_equalizer: least-squares channel estimation and one-tap equalisation of
// an OFDM receiver, the hardware block verified in the testbed example.
//
// Input is the FFT output of a frame: one complex value per cycle at most,
// tagged with its bin (0..63) and with the part of the frame it belongs to.
// During the two long training symbols the known training value X_LT(k)
// (+1, -1 or 0, 802.11a) gives the estimate H(k) = Y_LT(k) / X_LT(k), which
// for +-1 is a sign change. The two symbols are summed, S(k) = Y1 X + Y2 X,
// so the estimate is H(k) = S(k) / 2. Every SIGNAL or DATA value Y(k) is then
// divided by the estimate:
//     X(k) = Y(k) / H(k) = 2 * Y(k) * conj(S(k)) / |S(k)|^2
// computed with two complex-multiply terms and two pipelined dividers, so a
// value can enter every cycle. Bins the training leaves empty (H = 0) give 0.
//
// Output values are signed 16 bit with OUT_FRAC fraction bits (default 12:
// a unit constellation point is 4096), saturated. Latency from in_valid to
// out_valid is LATENCY = 19 cycles; only SIGNAL/DATA values produce output.
//
// The LS estimate and the division by it follow the document; it prints the
// equalisation step as a product with the estimate, which this design reads
// as multiplication by its inverse. Averaging both training symbols, the
// number formats and the pipeline are this design's choices.
module ls_equalizer
  import testbed_pkg::*;
#(
  parameter int unsigned OUT_FRAC = 12
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  cplx_t     in_data,
  input  logic [5:0] in_idx,
  input  sym_kind_e in_kind,
  output logic      out_valid,
  output cplx_t     out_data,
  output logic [5:0] out_idx
);
  localparam int unsigned Q_W     = SAMPLE_W;
  localparam int unsigned HW      = SAMPLE_W + 2;          // width of S(k)
  localparam int unsigned PW      = SAMPLE_W + HW + 1;     // Y * conj(S)
  localparam int unsigned DW      = 2 * HW;                // |S|^2
  localparam int unsigned NUM_W   = PW + OUT_FRAC + 1;
  localparam int unsigned LATENCY = 2 + Q_W + 1;

  typedef struct packed {
    logic signed [HW-1:0] re;
    logic signed [HW-1:0] im;
  } hsum_t;

  hsum_t h_mem [NFFT];

  // ---------------- stage 1: training update / estimate lookup ----------------
  logic [1:0]            lts;
  logic signed [HW-1:0]  yx_re, yx_im;
  hsum_t                 h_cur;

  assign lts   = lts_value(in_idx);
  assign h_cur = h_mem[in_idx];

  always_comb begin
    if (!lts[1]) begin
      yx_re = '0; yx_im = '0;
    end else if (lts[0]) begin
      yx_re = -HW'(in_data.re); yx_im = -HW'(in_data.im);
    end else begin
      yx_re = HW'(in_data.re);  yx_im = HW'(in_data.im);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_kind == SYM_LT1) begin
      h_mem[in_idx].re <= yx_re;
      h_mem[in_idx].im <= yx_im;
    end else if (in_valid && in_kind == SYM_LT2) begin
      h_mem[in_idx].re <= h_cur.re + yx_re;
      h_mem[in_idx].im <= h_cur.im + yx_im;
    end
  end

  logic        s1_valid;
  cplx_t       s1_y;
  hsum_t       s1_h;
  logic [5:0]  s1_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid && in_kind == SYM_DATA;
  end
  always_ff @(posedge clk) begin
    s1_y   <= in_data;
    s1_h   <= h_cur;
    s1_idx <= in_idx;
  end

  // ---------------- stage 2: Y * conj(S) and |S|^2 ----------------
  logic signed [PW-1:0]  n_re, n_im;
  logic [DW-1:0]         den;
  logic                  s2_valid;
  logic [5:0]            s2_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_valid <= 1'b0;
    else        s2_valid <= s1_valid;
  end
  always_ff @(posedge clk) begin
    n_re   <= PW'(s1_y.re * s1_h.re) + PW'(s1_y.im * s1_h.im);
    n_im   <= PW'(s1_y.im * s1_h.re) - PW'(s1_y.re * s1_h.im);
    den    <= DW'(s1_h.re * s1_h.re) + DW'(s1_h.im * s1_h.im);
    s2_idx <= s1_idx;
  end

  // ---------------- stage 3: divide magnitudes, restore signs ----------------
  logic [PW-1:0]    abs_re, abs_im;
  logic [NUM_W-1:0] mag_re, mag_im;
  assign abs_re = n_re[PW-1] ? PW'(-n_re) : PW'(n_re);
  assign abs_im = n_im[PW-1] ? PW'(-n_im) : PW'(n_im);
  assign mag_re = NUM_W'(abs_re) << (OUT_FRAC + 1);
  assign mag_im = NUM_W'(abs_im) << (OUT_FRAC + 1);

  logic           dv_re, dv_im;
  logic [Q_W-1:0] q_re, q_im;
  logic [7:0]     tag_re, tag_im;

  pipe_divider #(.NUM_W(NUM_W), .DEN_W(DW), .Q_W(Q_W), .TAG_W(8)) u_div_re (
    .clk, .rst_n, .in_valid(s2_valid), .in_num(mag_re), .in_den(den),
    .in_tag({n_re[PW-1], n_im[PW-1], s2_idx}),
    .out_valid(dv_re), .out_quo(q_re), .out_tag(tag_re));

  pipe_divider #(.NUM_W(NUM_W), .DEN_W(DW), .Q_W(Q_W), .TAG_W(8)) u_div_im (
    .clk, .rst_n, .in_valid(s2_valid), .in_num(mag_im), .in_den(den),
    .in_tag({n_re[PW-1], n_im[PW-1], s2_idx}),
    .out_valid(dv_im), .out_quo(q_im), .out_tag(tag_im));

  function automatic logic signed [SAMPLE_W-1:0] apply_sign(input logic neg,
                                                            input logic [Q_W-1:0] m);
    logic [Q_W-1:0] lim;
    lim = (m > Q_W'(2**(SAMPLE_W-1) - 1)) ? Q_W'(2**(SAMPLE_W-1) - 1) : m;
    return neg ? -SAMPLE_W'(lim) : SAMPLE_W'(lim);
  endfunction

  assign out_valid   = dv_re;
  assign out_data.re = apply_sign(tag_re[7], q_re);
  assign out_data.im = apply_sign(tag_re[6], q_im);
  assign out_idx     = tag_re[5:0];

  // both dividers run in lock step
  a_lockstep: assert property (@(posedge clk) dv_re == dv_im && (!dv_re || tag_re == tag_im));
endmodule
