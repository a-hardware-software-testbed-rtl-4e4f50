// tb_ofdm_sync: self-checking test of the frame synchroniser.
// Builds six frames with the reference layout (16-periodic short training,
// 32-sample guard, two long training symbols computed here from the 802.11a
// table, SIGNAL and 22 data symbols of random samples with their cyclic
// prefixes) at levels from 30 % to 180 % (detection is normalised by the
// signal energy, so the level must not matter), separated by low-level
// noise, and checks that each is found once
// and that exactly the 25 expected 64-sample windows come out, in order,
// with the right kinds, frame by frame. The output side is stalled at random.
`timescale 1ns/1ps
module tb_ofdm_sync;
  import testbed_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, out_ready = 0, locked, frame_found;
  cplx_t in_data = '0, out_data; sym_kind_e out_kind;

  ofdm_sync dut (.*);

  localparam int NFRAMES = 6;
  localparam int LEVEL [NFRAMES] = '{100, 30, 180, 60, 100, 140};   // percent
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lts_tab [53] = '{1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,0,
                       1,-1,-1,1,1,-1,1,-1,1,-1,-1,-1,-1,-1,1,1,-1,-1,1,-1,1,-1,1,1,1,1};
  int lr[64], li[64];

  cplx_t expq[$]; sym_kind_e kindq[$]; int frameq[$];
  cplx_t stream[$];
  int found = 0, outs = 0, mism = 0, kmism = 0;
  int f_outs[NFRAMES], f_bad[NFRAMES];
  always @(posedge clk) begin
    if (frame_found) found++;
    if (out_valid && out_ready) begin
      outs++;
      if (expq.size() == 0) mism++;
      else begin
        automatic int f = frameq.pop_front();
        automatic bit bad = 0;
        if (out_data != expq.pop_front()) begin mism++; bad = 1; end
        if (out_kind != kindq.pop_front()) begin kmism++; bad = 1; end
        f_outs[f]++;
        if (bad) f_bad[f]++;
      end
    end
  end
  always @(negedge clk) out_ready = ($urandom % 3) != 0;

  function automatic cplx_t mk(int r, int i);
    cplx_t c; c.re = 16'(r); c.im = 16'(i); return c;
  endfunction

  task automatic noise(int n);
    int a, b;
    for (int i = 0; i < n; i++) begin
      a = $urandom % 41; b = $urandom % 41;
      stream.push_back(mk(a - 20, b - 20));
    end
  endtask

  // one frame; all its samples scaled by lvl percent
  task automatic frame(int fi, int lvl);
    cplx_t sts[16], sym[64];
    int a, b;
    for (int i = 0; i < 16; i++) begin
      a = $urandom % 1601; b = $urandom % 1601; sts[i] = mk((a - 800) * lvl / 100, (b - 800) * lvl / 100);
    end
    for (int r = 0; r < 10; r++) for (int i = 0; i < 16; i++) stream.push_back(sts[i]);
    for (int i = 32; i < 64; i++) stream.push_back(mk(lr[i] * lvl / 100, li[i] * lvl / 100));
    for (int t = 0; t < 2; t++) for (int i = 0; i < 64; i++) begin
      stream.push_back(mk(lr[i] * lvl / 100, li[i] * lvl / 100));
      expq.push_back(mk(lr[i] * lvl / 100, li[i] * lvl / 100));
      kindq.push_back(t == 0 ? SYM_LT1 : SYM_LT2); frameq.push_back(fi);
    end
    for (int s = 0; s < 23; s++) begin
      for (int i = 0; i < 64; i++) begin
        a = $urandom % 2001; b = $urandom % 2001; sym[i] = mk((a - 1000) * lvl / 100, (b - 1000) * lvl / 100);
        expq.push_back(sym[i]); kindq.push_back(SYM_DATA); frameq.push_back(fi);
      end
      for (int i = 48; i < 64; i++) stream.push_back(sym[i]);
      for (int i = 0; i < 64; i++) stream.push_back(sym[i]);
    end
  endtask

  initial begin
    // time-domain long training symbol, scaled by 100
    for (int n = 0; n < 64; n++) begin
      real ar, ai, ang, x;
      ar = 0.0; ai = 0.0;
      for (int k = 0; k < 64; k++) begin
        x = (k < 32) ? ((k <= 26) ? lts_tab[k + 26] : 0) : ((k >= 38) ? lts_tab[k - 64 + 26] : 0);
        ang = 6.283185307179586 * k * n / 64.0;
        ar += x * $cos(ang); ai += x * $sin(ang);
      end
      lr[n] = $rtoi(ar * 100.0); li[n] = $rtoi(ai * 100.0);
    end
    noise(300);
    for (int f = 0; f < NFRAMES; f++) begin frame(f, LEVEL[f]); noise(2500); end
    #1 rst_n = 0; #20 rst_n = 1;
    foreach (stream[i]) begin
      @(negedge clk); in_valid = 1; in_data = stream[i];
    end
    @(negedge clk) in_valid = 0;
    repeat (3000) @(posedge clk);
    check(found == NFRAMES, $sformatf("frames found %0d", found));
    check(outs == NFRAMES * 25 * 64, $sformatf("samples out %0d", outs));
    check(mism == 0, $sformatf("%0d samples differ", mism));
    check(kmism == 0, $sformatf("%0d kinds differ", kmism));
    check(!locked, "searching again at the end");
    for (int f = 0; f < NFRAMES; f++)
      check(f_outs[f] == 25 * 64 && f_bad[f] == 0,
            $sformatf("frame %0d at level %0d%%: %0d samples, %0d wrong", f, LEVEL[f], f_outs[f], f_bad[f]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
