// ofdm_sync: frame synchroniser of the OFDM receiver. Finds the long training
// symbols in the converter sample stream, keeps the frame, and hands its
// symbols, cyclic prefixes removed, to the FFT.
//
// Timing: every sample is cross-correlated with the 64-sample long training
// symbol, using only the signs of its real and imaginary parts (so the
// correlator is 64 additions per component, no multipliers):
//     c(n) = sum_m x(n-63+m) * (sgn Lr(m) - j sgn Li(m))
// The time-domain symbol L(m) is the inverse DFT of the 802.11a training
// values, computed at elaboration. The metric |c(n)|^2 is compared with
// 52 * E(n), E(n) being the energy of the same 64 samples (a normalised
// correlation above 0.81; an exact match gives about 1.3, noise about 0.02,
// and the window ending with the 32-sample guard, whose second half is the
// guard itself and so matches half the symbol, about 0.33). After a crossing, the largest metric of the next 8 samples marks
// the last sample of a long training symbol. It is taken as the end of LT2
// only if the metric also crossed the threshold 63 to 65 samples earlier
// (the end of LT1); a 73-bit history of crossings holds that. Otherwise the
// search goes on, so a false crossing in the short training or guard, or
// the LT1 peak itself, costs nothing: the LT2 peak still follows.
//
// Buffering: samples go into a 2^BUF_AW-entry circular buffer all the time,
// so the training symbol found in the past is still there. From its start
// the buffer keeps 2*64 + 80*(1 + DATA_SYMS) samples (LT1, LT2, SIGNAL and
// DATA_SYMS data symbols, 1968 in the reference frame), then writing stops
// and the symbols are read out, 64 samples each, skipping the 16-sample
// prefixes, through out_valid/out_ready, tagged SYM_LT1, SYM_LT2, then
// SYM_DATA for SIGNAL and data. When the last symbol has gone the search
// starts again. Samples that arrive while a frame is being read out are not
// examined, so with the 320-clock FFT at the converter clock every other
// frame or so is processed; the testbed works on captured frames, not on a
// continuous stream.
//
// The frame layout follows the document's description of the test frame;
// the document only names the synchroniser, so the method is this design's
// choice. Carrier frequency offset is not estimated or corrected.
module ofdm_sync
  import testbed_pkg::*;
#(
  parameter int unsigned DATA_SYMS_P = DATA_SYMS,  // data symbols per frame
  parameter int unsigned BUF_AW      = 11
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  cplx_t     in_data,
  output logic      out_valid,
  input  logic      out_ready,
  output cplx_t     out_data,
  output sym_kind_e out_kind,
  output logic      locked,       // a frame has been found and is being read
  output logic      frame_found   // one-cycle pulse when timing is decided
);
  localparam int unsigned KEEP  = 2 * LTS_LEN + SYM_LEN * (1 + DATA_SYMS_P);
  localparam int unsigned NSYM  = 3 + DATA_SYMS_P;
  localparam int unsigned CW    = SAMPLE_W + 7;      // correlator sum width
  localparam int unsigned MW    = 2 * CW;            // metric width
  localparam int unsigned SEARCH = 8;

  // ---- signs of the time-domain long training symbol ----
  typedef logic [63:0] sgn_t;
  function automatic sgn_t lts_sign(input bit imag);
    sgn_t r;
    logic [1:0] v;
    real acc, a, x;
    for (int n = 0; n < 64; n++) begin
      acc = 0.0;
      for (int k = 0; k < 64; k++) begin
        v   = lts_value(6'(k));
        a   = 6.283185307179586 * k * n / 64.0;
        x   = v[1] ? (v[0] ? -1.0 : 1.0) : 0.0;
        acc += x * (imag ? $sin(a) : $cos(a));
      end
      r[n] = (acc < 0.0);   // 1: negative
    end
    return r;
  endfunction
  localparam sgn_t NEG_R = lts_sign(1'b0);
  localparam sgn_t NEG_I = lts_sign(1'b1);

  // ---- correlation window (win[63] is the newest sample) ----
  cplx_t win [64];
  logic signed [CW-1:0] c_re, c_im;
  always_comb begin
    c_re = '0; c_im = '0;
    for (int m = 0; m < 64; m++) begin
      // x * (sr - j si): re = xr sr + xi si, im = xi sr - xr si
      c_re += NEG_R[m] ? -CW'(win[m].re) : CW'(win[m].re);
      c_re += NEG_I[m] ? -CW'(win[m].im) : CW'(win[m].im);
      c_im += NEG_R[m] ? -CW'(win[m].im) : CW'(win[m].im);
      c_im += NEG_I[m] ? CW'(win[m].re)  : -CW'(win[m].re);
    end
  end

  logic [MW-1:0] energy, metric, best;
  logic [MW-1:0] e_new, e_old;
  assign e_new  = MW'(in_data.re * in_data.re) + MW'(in_data.im * in_data.im);
  assign e_old  = MW'(win[0].re * win[0].re) + MW'(win[0].im * win[0].im);
  assign metric = MW'(c_re * c_re) + MW'(c_im * c_im);

  typedef enum logic [1:0] { S_SEARCH, S_PEAK, S_FILL, S_READ } sstate_e;
  sstate_e state;

  cplx_t              buf_mem [1 << BUF_AW];
  logic [BUF_AW-1:0]  wptr, start, best_ptr;
  logic [3:0]         scount;
  logic [11:0]        filled;
  logic [4:0]         sym;
  logic [5:0]         rcnt;
  logic               win_full;
  logic [72:0]        above_hist;    // bit a-1: crossing a samples ago
  logic               above_now;
  logic [6:0]         nwin;

  logic writing;
  assign writing = in_valid && (state != S_READ);

  // peak if the search ends now, its distance from the newest sample, and
  // the first sample of LT1 if it is the end of LT2
  logic [BUF_AW-1:0] peak_new, start_new;
  logic [3:0]        peak_age;
  logic              confirmed;
  assign above_now = win_full && (metric > (energy << 5) + (energy << 4) + (energy << 2));
  assign peak_new  = (metric > best) ? wptr - 1'b1 : best_ptr;
  assign peak_age  = 4'(wptr - 1'b1 - peak_new);   // 0..SEARCH
  assign start_new = peak_new - BUF_AW'(2 * LTS_LEN - 1);
  assign confirmed = |above_hist[7'(peak_age) + 7'd62 +: 3];

  always_ff @(posedge clk) begin
    if (writing) buf_mem[wptr] <= in_data;
  end

  // offset of symbol s within the kept frame
  function automatic logic [11:0] sym_off(input logic [4:0] s);
    if (s == 0)      return 12'd0;
    else if (s == 1) return 12'd64;
    else             return 12'(2 * LTS_LEN + SYM_LEN * (int'(s) - 2) + (SYM_LEN - NFFT));
  endfunction

  logic [BUF_AW-1:0] raddr;
  assign raddr     = start + BUF_AW'(sym_off(sym)) + BUF_AW'(rcnt);
  assign out_data  = buf_mem[raddr];
  assign out_valid = (state == S_READ);
  assign out_kind  = (sym == 0) ? SYM_LT1 : (sym == 1) ? SYM_LT2 : SYM_DATA;
  assign locked    = (state == S_FILL) || (state == S_READ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_SEARCH;
      wptr        <= '0;
      start       <= '0;
      best_ptr    <= '0;
      best        <= '0;
      scount      <= '0;
      filled      <= '0;
      sym         <= '0;
      rcnt        <= '0;
      energy      <= '0;
      nwin        <= '0;
      win_full    <= 1'b0;
      above_hist  <= '0;
      frame_found <= 1'b0;
      for (int m = 0; m < 64; m++) win[m] <= '0;
    end else begin
      frame_found <= 1'b0;
      if (writing) begin
        wptr <= wptr + 1'b1;
        for (int m = 0; m < 63; m++) win[m] <= win[m+1];
        win[63] <= in_data;
        energy  <= energy + e_new - e_old;
        if (nwin != 7'd64) nwin <= nwin + 1'b1;
        else               win_full <= 1'b1;
        above_hist <= {above_hist[71:0], above_now};
      end
      case (state)
        // the metric refers to the window ending at sample wptr-1
        S_SEARCH: if (writing && above_now) begin
          state    <= S_PEAK;
          best     <= metric;
          best_ptr <= wptr - 1'b1;
          scount   <= '0;
        end
        S_PEAK: if (writing) begin
          if (metric > best) begin
            best     <= metric;
            best_ptr <= wptr - 1'b1;
          end
          scount <= scount + 1'b1;
          if (scount == 4'(SEARCH - 1)) begin
            if (confirmed) begin
              state       <= S_FILL;
              start       <= start_new;
              frame_found <= 1'b1;
              // samples of the frame in the buffer once this one is written
              filled      <= 12'(BUF_AW'(wptr + 1'b1 - start_new));
            end else begin
              state <= S_SEARCH;
              best  <= '0;
            end
          end
        end
        S_FILL: begin
          if (writing) filled <= filled + 1'b1;
          if (filled >= 12'(KEEP)) begin
            state <= S_READ;
            sym   <= '0;
            rcnt  <= '0;
          end
        end
        S_READ: if (out_ready) begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == 6'd63) begin
            sym <= sym + 1'b1;
            if (sym == 5'(NSYM - 1)) begin
              state    <= S_SEARCH;
              nwin     <= '0;
              win_full <= 1'b0;
              energy   <= '0;
              above_hist <= '0;
              for (int m = 0; m < 64; m++) win[m] <= '0;
            end
          end
        end
        default: state <= S_SEARCH;
      endcase
    end
  end
endmodule
