// tb_ls_equalizer: self-checking test of the LS equaliser.
// A random frequency-selective channel multiplies the 802.11a long training
// values and three symbols of 16-QAM points (unit grid +-1, +-1/3); the values
// stream in back to back. The expected output is worked out here in real
// arithmetic from the same integer inputs: Y(k) divided by the mean of the
// two training estimates. Checks every data value to within 2 LSB, zero on
// the empty bins, the bin order, one value per cycle and a 19-cycle latency.
`timescale 1ns/1ps
module tb_ls_equalizer;
  import testbed_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic in_valid = 0; cplx_t in_data = '0; logic [5:0] in_idx = 0; sym_kind_e in_kind = SYM_OTHER;
  logic out_valid; cplx_t out_data; logic [5:0] out_idx;

  ls_equalizer dut (.*);

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

  // 802.11a long training sequence L(-26..26), written out independently
  int lts_tab [53] = '{1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,0,
                       1,-1,-1,1,1,-1,1,-1,1,-1,-1,-1,-1,-1,1,1,-1,-1,1,-1,1,-1,1,1,1,1};
  function automatic int ltsx(int k);   // bin k = 0..63
    int f = (k < 32) ? k : k - 64;
    if (f < -26 || f > 26) return 0;
    return lts_tab[f + 26];
  endfunction

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  real hr[64], hi[64];
  real exp_re[$], exp_im[$]; int exp_idx[$];
  int in_cycle[$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  int outs = 0, lat_ok = 0, lat_bad = 0, prev_out_cycle = -1, gaps = 0;
  always @(posedge clk) begin
    if (out_valid) begin
      real er, ei;
      if (exp_re.size() == 0) check(0, "unexpected output");
      else begin
        er = exp_re.pop_front(); ei = exp_im.pop_front();
        check(out_idx == 6'(exp_idx.pop_front()), "bin order");
        check(absr($itor(out_data.re) - er) <= 2.0 && absr($itor(out_data.im) - ei) <= 2.0,
              $sformatf("bin %0d got %0d,%0d want %0.1f,%0.1f", out_idx, out_data.re, out_data.im, er, ei));
        if (cyc - in_cycle.pop_front() == 19) lat_ok++; else lat_bad++;
        if (prev_out_cycle >= 0 && cyc - prev_out_cycle != 1) gaps++;
        prev_out_cycle = cyc;
        outs++;
      end
    end
  end

  function automatic int clip16(real v);
    int r = int'(v);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    int yr1[64], yi1[64], yr2[64], yi2[64];
    real amp = 3000.0;
    #1 rst_n = 0; #20 rst_n = 1;
    // random channel, magnitude 0.3 .. 1.5
    for (int k = 0; k < 64; k++) begin
      automatic real m = 0.3 + 1.2 * ($urandom % 1000) / 1000.0;
      automatic real ph = 6.2831853 * ($urandom % 1000) / 1000.0;
      hr[k] = m * $cos(ph); hi[k] = m * $sin(ph);
    end
    // two training symbols with a little independent noise
    for (int k = 0; k < 64; k++) begin
      yr1[k] = clip16(amp * ltsx(k) * hr[k]) + int'($urandom % 5) - 2;
      yi1[k] = clip16(amp * ltsx(k) * hi[k]) + int'($urandom % 5) - 2;
      yr2[k] = clip16(amp * ltsx(k) * hr[k]) + int'($urandom % 5) - 2;
      yi2[k] = clip16(amp * ltsx(k) * hi[k]) + int'($urandom % 5) - 2;
    end
    @(negedge clk);
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < 64; k++) begin
        in_valid = 1; in_idx = 6'(k); in_kind = s == 0 ? SYM_LT1 : SYM_LT2;
        in_data.re = 16'(s == 0 ? yr1[k] : yr2[k]); in_data.im = 16'(s == 0 ? yi1[k] : yi2[k]);
        @(negedge clk);
      end
    // three data symbols back to back
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < 64; k++) begin
        automatic real dr = (2.0 * ($urandom % 4) - 3.0) / 3.0, di = (2.0 * ($urandom % 4) - 3.0) / 3.0;
        automatic int yr = clip16(amp * (dr * hr[k] - di * hi[k]));
        automatic int yi = clip16(amp * (dr * hi[k] + di * hr[k]));
        automatic real x = ltsx(k);
        automatic real er = 0, ei = 0;
        if (x != 0) begin
          automatic real h_r = (yr1[k] + yr2[k]) / 2.0 / x, h_i = (yi1[k] + yi2[k]) / 2.0 / x;
          automatic real d = h_r * h_r + h_i * h_i;
          er = (yr * h_r + yi * h_i) / d * 4096.0;
          ei = (yi * h_r - yr * h_i) / d * 4096.0;
        end
        exp_re.push_back(er); exp_im.push_back(ei); exp_idx.push_back(k);
        in_cycle.push_back(cyc + 1);
        in_valid = 1; in_idx = 6'(k); in_kind = SYM_DATA;
        in_data.re = 16'(yr); in_data.im = 16'(yi);
        @(negedge clk);
      end
    // a value outside the frame must be ignored
    in_kind = SYM_OTHER; in_idx = 6'd5; @(negedge clk);
    in_valid = 0;
    repeat (40) @(posedge clk);
    check(outs == 192, $sformatf("outputs %0d", outs));
    check(lat_bad == 0 && lat_ok == 192, $sformatf("latency 19 for all (%0d bad)", lat_bad));
    check(gaps == 0, "one value per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
