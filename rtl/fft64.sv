// fft64: 64-point FFT of the OFDM receiver (the block after the
// synchroniser that turns each 64-sample symbol into its subcarrier values).
//
// Memory-based radix-2 decimation-in-time design. A symbol of 64 complex
// samples is written into a working array in bit-reversed address order,
// then six stages of 32 butterflies run, one butterfly per clock, each
// stage halving its results (with rounding) so nothing can overflow; the
// array is then read out in natural bin order. The result is therefore the
// DFT divided by 64:
//     X(k) = (1/64) * sum_n x(n) * exp(-j 2 pi n k / 64)
// Twiddle factors are cos/sin values rounded to 1.14 fixed point, computed
// at elaboration.
//
// Interface: in_valid/in_ready/in_data/in_kind (kind of the symbol, taken
// from its first sample and passed on), out_valid/out_data/out_idx/out_kind.
// Timing: 64 load cycles, 192 butterfly cycles and 64 output cycles, 320
// clocks per symbol with no overlap; in_ready is low while a symbol is being
// transformed or read out. To keep up with 80-sample symbols at a 20 MHz
// sample rate the block therefore needs a clock of at least 80 MHz. The
// document names the FFT only; the architecture, scaling and number formats
// are this design's choices.
module fft64
  import testbed_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  cplx_t      in_data,
  input  sym_kind_e  in_kind,
  output logic       out_valid,
  output cplx_t      out_data,
  output logic [5:0] out_idx,
  output sym_kind_e  out_kind
);
  localparam int unsigned TW_FRAC = 14;

  typedef logic signed [SAMPLE_W-1:0] tw_arr_t [32];

  function automatic tw_arr_t make_tw(input bit sine);
    tw_arr_t t;
    for (int k = 0; k < 32; k++) begin
      real a = 6.283185307179586 * k / 64.0;
      real v = (sine ? $sin(a) : $cos(a)) * (1 << TW_FRAC);
      t[k] = SAMPLE_W'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return t;
  endfunction

  localparam tw_arr_t TW_COS = make_tw(1'b0);
  localparam tw_arr_t TW_SIN = make_tw(1'b1);

  typedef enum logic [1:0] { F_LOAD, F_CALC, F_OUT } fstate_e;

  fstate_e    state;
  cplx_t      mem [NFFT];
  logic [5:0] cnt;       // load / output index
  logic [2:0] stage;
  logic [4:0] bfly;
  sym_kind_e  kind;

  function automatic logic [5:0] bitrev6(input logic [5:0] a);
    return {a[0], a[1], a[2], a[3], a[4], a[5]};
  endfunction

  // butterfly addresses and twiddle for (stage, bfly)
  logic [5:0] i0, i1, span, pos;
  logic [4:0] twk;
  always_comb begin
    span = 6'd1 << stage;
    pos  = 6'(bfly) & (span - 6'd1);
    i0   = ((6'(bfly) >> stage) << (stage + 3'd1)) | pos;
    i1   = i0 + span;
    twk  = 5'(pos << (3'd5 - stage));
  end

  // t = x[i1] * W^k with W^k = cos - j sin
  localparam int unsigned PW = 2 * SAMPLE_W + 1;
  cplx_t                 a, b;
  logic signed [PW-1:0]  pr, pi;
  logic signed [SAMPLE_W+1:0] tr, ti;
  logic signed [SAMPLE_W+1:0] sr, si, dr, di;
  logic signed [SAMPLE_W-1:0] wc, ws;

  assign a  = mem[i0];
  assign b  = mem[i1];
  assign wc = TW_COS[twk];
  assign ws = TW_SIN[twk];

  always_comb begin
    pr = PW'(b.re * wc) + PW'(b.im * ws);
    pi = PW'(b.im * wc) - PW'(b.re * ws);
    // back to sample scale with rounding
    tr = (SAMPLE_W+2)'((pr + PW'(1 << (TW_FRAC - 1))) >>> TW_FRAC);
    ti = (SAMPLE_W+2)'((pi + PW'(1 << (TW_FRAC - 1))) >>> TW_FRAC);
    sr = (SAMPLE_W+2)'(a.re) + tr + (SAMPLE_W+2)'(1);
    si = (SAMPLE_W+2)'(a.im) + ti + (SAMPLE_W+2)'(1);
    dr = (SAMPLE_W+2)'(a.re) - tr + (SAMPLE_W+2)'(1);
    di = (SAMPLE_W+2)'(a.im) - ti + (SAMPLE_W+2)'(1);
  end

  function automatic logic signed [SAMPLE_W-1:0] half_sat(input logic signed [SAMPLE_W+1:0] v);
    logic signed [SAMPLE_W+1:0] h;
    h = v >>> 1;
    if (h > (SAMPLE_W+2)'(2**(SAMPLE_W-1) - 1))  return SAMPLE_W'(2**(SAMPLE_W-1) - 1);
    if (h < -(SAMPLE_W+2)'(2**(SAMPLE_W-1)))     return SAMPLE_W'(-(2**(SAMPLE_W-1)));
    return SAMPLE_W'(h);
  endfunction

  always_ff @(posedge clk) begin
    if (state == F_LOAD && in_valid) mem[bitrev6(cnt)] <= in_data;
    else if (state == F_CALC) begin
      mem[i0] <= '{re: half_sat(sr), im: half_sat(si)};
      mem[i1] <= '{re: half_sat(dr), im: half_sat(di)};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= F_LOAD;
      cnt   <= '0;
      stage <= '0;
      bfly  <= '0;
      kind  <= SYM_OTHER;
    end else begin
      case (state)
        F_LOAD: if (in_valid) begin
          if (cnt == 0) kind <= in_kind;
          cnt <= cnt + 1'b1;
          if (cnt == 6'd63) begin
            state <= F_CALC;
            stage <= '0;
            bfly  <= '0;
          end
        end
        F_CALC: begin
          bfly <= bfly + 1'b1;
          if (bfly == 5'd31) begin
            stage <= stage + 1'b1;
            if (stage == 3'd5) begin
              state <= F_OUT;
              cnt   <= '0;
            end
          end
        end
        F_OUT: begin
          cnt <= cnt + 1'b1;
          if (cnt == 6'd63) state <= F_LOAD;
        end
        default: state <= F_LOAD;
      endcase
    end
  end

  assign in_ready  = (state == F_LOAD);
  assign out_valid = (state == F_OUT);
  assign out_data  = mem[cnt];
  assign out_idx   = cnt;
  assign out_kind  = kind;
endmodule
