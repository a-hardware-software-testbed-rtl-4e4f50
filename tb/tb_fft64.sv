// tb_fft64: self-checking test of the 64-point FFT.
// Three symbols (random samples, a single complex tone, a constant) are
// transformed; each output is compared with a direct DFT divided by 64,
// computed here in real arithmetic, to within 3 LSB. Also checks bin order,
// that the symbol kind is carried through and the 320-cycle symbol period.
`timescale 1ns/1ps
module tb_fft64;
  import testbed_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid; cplx_t in_data = '0, out_data;
  sym_kind_e in_kind = SYM_OTHER, out_kind; logic [5:0] out_idx;

  fft64 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  real xr[3][64], xi[3][64];
  int sym_out = 0, bin = 0, cyc = 0, first_out[3];
  sym_kind_e kinds[3] = '{SYM_LT1, SYM_LT2, SYM_DATA};
  always @(posedge clk) cyc++;

  always @(posedge clk) if (out_valid) begin
    real er, ei, ang;
    er = 0.0; ei = 0.0;
    for (int n = 0; n < 64; n++) begin
      ang = -6.283185307179586 * n * bin / 64.0;
      er += xr[sym_out][n] * $cos(ang) - xi[sym_out][n] * $sin(ang);
      ei += xr[sym_out][n] * $sin(ang) + xi[sym_out][n] * $cos(ang);
    end
    er /= 64.0; ei /= 64.0;
    if (bin == 0) first_out[sym_out] = cyc;
    check(out_idx == 6'(bin), "bin order");
    check(out_kind == kinds[sym_out], "kind carried");
    check(absr(out_data.re - er) <= 3.0 && absr(out_data.im - ei) <= 3.0,
          $sformatf("sym %0d bin %0d got %0d,%0d want %0.1f,%0.1f", sym_out, bin,
                    out_data.re, out_data.im, er, ei));
    bin++;
    if (bin == 64) begin bin = 0; sym_out++; end
  end

  initial begin
    real a;
    int r1, r2;
    for (int n = 0; n < 64; n++) begin
      a = 6.283185307179586 * 5 * n / 64.0;
      r1 = $urandom % 4001; r2 = $urandom % 4001;
      xr[0][n] = r1 - 2000; xi[0][n] = r2 - 2000;
      xr[1][n] = $rtoi(1500.0 * $cos(a)); xi[1][n] = $rtoi(1500.0 * $sin(a));
      xr[2][n] = 700; xi[2][n] = -300;
    end
    #1 rst_n = 0; #20 rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      for (int n = 0; n < 64; n++) begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        in_valid = 1; in_kind = kinds[s];
        in_data.re = 16'($rtoi(xr[s][n])); in_data.im = 16'($rtoi(xi[s][n]));
        @(posedge clk); #1 in_valid = 0;
      end
    end
    wait (sym_out == 3);
    check(first_out[1] - first_out[0] == 320 && first_out[2] - first_out[1] == 320,
          $sformatf("symbol period %0d", first_out[1] - first_out[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
