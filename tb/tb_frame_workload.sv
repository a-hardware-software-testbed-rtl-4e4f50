// tb_frame_workload: the reference frame workload on the whole board, at
// its default sizes. One received frame of the reference layout (short
// training, guard, two long training symbols, SIGNAL and 22 data symbols of
// 16-QAM, 80 samples each, then the 411-sample gap) goes through the board
// twice and back to the host in UDP packets of at most 368 samples (1472
// payload bytes, the most a standard 1500-byte Ethernet payload holds
// beside the IPv4 and UDP headers):
//   1. equaliser mode: the synchroniser finds the frame, and all 23 x 64 =
//      1472 equalised subcarrier values are captured and sent in 4 packets;
//      every value must decode to the transmitted 16-QAM point, and the
//      mean error must stay small;
//   2. raw mode: 2571 consecutive AD samples (frame plus gap) are captured
//      and sent in 7 packets; they must be a gap-free run of what the AD
//      converter delivered, with the whole frame inside.
// The testbench plays the MCU, the host, the PHY and the radio, as the
// end-to-end testbench does.
`timescale 1ns/1ps
module tb_frame_workload;
  import testbed_pkg::*;
  logic clk_sys = 0, clk_bb = 0, rst_sys_n = 1, rst_bb_n = 1;
  logic mii_tx_clk = 0, mii_rx_clk = 0;
  always #31 clk_sys = ~clk_sys;        // ~16 MHz MCU clock
  always #25 clk_bb = ~clk_bb;          // 20 MHz converter clock
  always #200 mii_tx_clk = ~mii_tx_clk; // 10 Mb/s MII
  always #200 mii_rx_clk = ~mii_rx_clk;

  logic [7:0] bus_addr = 0, bus_wdata = 0, bus_rdata; logic bus_we = 0;
  logic [3:0] mii_txd, mii_rxd = 0; logic mii_tx_en, mii_rx_dv = 0, mii_rx_er = 0;
  logic mii_crs = 0, mii_col = 0;
  logic spi_sclk, spi_mosi, spi_miso, spi_cs_n;
  logic [ADC_W-1:0] adc_i = 0, adc_q = 0, dac_i, dac_q; logic dac_valid;
  logic sync_locked;
  logic [4:0] mac_tx_attempts; logic dma_tx_stall; logic [15:0] cap_dropped, play_underruns;

  baseband_board dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin : watchdog
    #60ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_tx_frames = 0, n_collision = 0;

  // ---------------- MCU bus ----------------
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk_sys); bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk_sys); bus_we = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    @(negedge clk_sys); bus_addr = a; #1 d = bus_rdata;
  endtask
  task automatic wait_status(input logic [7:0] a, input int bitn, input bit val);
    logic [7:0] d;
    do begin repeat (8) @(posedge clk_sys); rd(a, d); end while (d[bitn] != val);
  endtask

  // ---------------- SPI slave (RF front-end) ----------------
  logic [7:0] spi_rx = 0, spi_tx = 8'hA5; logic [7:0] spi_bytes[$]; int spi_bits = 0;
  assign spi_miso = spi_tx[7];
  always @(posedge spi_sclk) if (!spi_cs_n) begin
    spi_rx = {spi_rx[6:0], spi_mosi}; spi_bits++;
    if (spi_bits % 8 == 0) spi_bytes.push_back(spi_rx);
  end
  always @(negedge spi_sclk) if (!spi_cs_n) spi_tx = {spi_tx[6:0], spi_tx[7]};

  // ---------------- Ethernet helpers ----------------
  function automatic logic [31:0] crc32(input logic [7:0] b[$]);
    logic [31:0] c = '1;
    foreach (b[i]) for (int k = 0; k < 8; k++) begin
      logic fb = c[0] ^ b[i][k];
      c = c >> 1;
      if (fb) c ^= 32'hEDB88320;
    end
    return ~c;
  endfunction

  function automatic void make_header(ref logic [7:0] h[$], input int payload_bytes);
    h = {};
    for (int i = 0; i < 42; i++) h.push_back(8'($urandom));
    h[12] = 8'h08; h[13] = 8'h00;
    h[38] = 8'((payload_bytes + 8) >> 8); h[39] = 8'(payload_bytes + 8);
  endfunction

  // host -> PHY -> MAC
  task automatic phy_send(input logic [7:0] f[$], input bit corrupt);
    logic [7:0] w[$]; logic [31:0] fcs;
    w = f;
    while (w.size() < 60) w.push_back(8'h00);
    fcs = crc32(w);
    for (int i = 0; i < 4; i++) w.push_back(fcs[8*i +: 8]);
    if (corrupt) w[20] ^= 8'h10;
    for (int i = 0; i < 7; i++) w.push_front(8'h55);
    w.insert(7, 8'hD5);
    foreach (w[i]) for (int n = 0; n < 2; n++) begin
      @(posedge mii_rx_clk); #5 mii_rxd = n == 0 ? w[i][3:0] : w[i][7:4]; mii_rx_dv = 1;
    end
    @(posedge mii_rx_clk); #5 mii_rx_dv = 0; mii_rxd = 0;
    repeat (30) @(posedge mii_rx_clk);
  endtask

  // MAC -> PHY -> host: nibbles of the current transmission
  logic [3:0] txn[$]; logic txen_q = 0;
  always @(posedge mii_tx_clk) begin
    if (mii_tx_en && !txen_q) txn = {};
    if (mii_tx_en) txn.push_back(mii_txd);
    if (!mii_tx_en && txen_q) n_tx_frames++;
    txen_q <= mii_tx_en;
  end
  // a collision asserted by the testbench on request
  bit force_collision = 0;
  always @(posedge mii_tx_clk) if (force_collision && mii_tx_en && txn.size() == 12) begin
    mii_col <= 1; mii_crs <= 1;
    repeat (4) @(posedge mii_tx_clk);
    mii_col <= 0; mii_crs <= 0; force_collision = 0; n_collision++;
  end

  // decode the last transmitted frame; returns bytes between SFD and FCS
  task automatic phy_take(output logic [7:0] f[$], output bit fcs_ok);
    logic [7:0] w[$]; logic [31:0] fcs;
    w = {};
    for (int i = 0; i + 1 < txn.size(); i += 2) w.push_back({txn[i+1], txn[i]});
    f = {}; fcs_ok = 0;
    if (w.size() < 72 || w[7] != 8'hD5) return;
    for (int i = 8; i < w.size() - 4; i++) f.push_back(w[i]);
    fcs = {w[w.size()-1], w[w.size()-2], w[w.size()-3], w[w.size()-4]};
    fcs_ok = (fcs == crc32(f));
  endtask

  // ---------------- AD source ----------------
  // a counter pattern, or queued frame samples with low-level noise between
  bit adc_frames = 0, locked_q = 0;
  int n_sync = 0;
  always @(posedge clk_bb) begin
    if (sync_locked && !locked_q && adc_frames) n_sync++;
    locked_q <= sync_locked;
  end
  int adc_n = 0, n_clip = 0;
  int adc_fifo_i[$], adc_fifo_q[$];
  always @(posedge clk_bb) begin
    if (!adc_frames) begin
      adc_i <= ADC_W'(adc_n); adc_q <= ADC_W'(-adc_n * 3);
    end else if (adc_fifo_i.size() != 0) begin
      adc_i <= ADC_W'(adc_fifo_i.pop_front()); adc_q <= ADC_W'(adc_fifo_q.pop_front());
    end else begin
      adc_i <= ADC_W'(int'($urandom % 9) - 4); adc_q <= ADC_W'(int'($urandom % 9) - 4);
    end
    adc_n++;
  end

  // 802.11a long training, written out here independently
  int lts_tab [53] = '{1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,0,
                       1,-1,-1,1,1,-1,1,-1,1,-1,-1,-1,-1,-1,1,1,-1,-1,1,-1,1,-1,1,1,1,1};
  function automatic int ltsx(int k);
    int f = (k < 32) ? k : k - 64;
    if (f < -26 || f > 26) return 0;
    return lts_tab[f + 26];
  endfunction
  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  // x(n) = sum_k Y(k) exp(+j 2 pi k n / 64), so that the FFT (which divides
  // by 64) returns Y(k)
  task automatic idft(input real yr[64], input real yi[64], output int xr[64], output int xi[64]);
    for (int n = 0; n < 64; n++) begin
      real ar, ai, ang;
      ar = 0.0; ai = 0.0;
      for (int k = 0; k < 64; k++) begin
        ang = 6.283185307179586 * k * n / 64.0;
        ar += yr[k] * $cos(ang) - yi[k] * $sin(ang);
        ai += yr[k] * $sin(ang) + yi[k] * $cos(ang);
      end
      xr[n] = $rtoi(ar >= 0.0 ? ar + 0.5 : ar - 0.5);
      xi[n] = $rtoi(ai >= 0.0 ? ai + 0.5 : ai - 0.5);
      if (xr[n] > 2047 || xr[n] < -2048 || xi[n] > 2047 || xi[n] < -2048) n_clip++;
    end
  endtask

  // One received frame through channel h: short training (16-periodic
  // stand-in), 32-sample guard, LT1, LT2, then SIGNAL and 22 data symbols of
  // random 16-QAM, each with a 16-sample cyclic prefix. Subcarrier values
  // are AMP * D(k) * h(k). Returns the data values D (SIGNAL first) and the
  // received LT1 subcarriers.
  localparam real AMP = 64.0;
  task automatic send_frame(input real hr[64], input real hi[64],
                            output real dre[$], output real dim[$],
                            output real l1r[64], output real l1i[64]);
    int xr[64], xi[64], sr[16], si[16];
    real yr[64], yi[64], dr, di;
    wait (!sync_locked);
    dre = {}; dim = {};
    for (int n = 0; n < 100; n++) begin
      adc_fifo_i.push_back(int'($urandom % 9) - 4); adc_fifo_q.push_back(int'($urandom % 9) - 4);
    end
    for (int n = 0; n < 16; n++) begin sr[n] = int'($urandom % 1001) - 500; si[n] = int'($urandom % 1001) - 500; end
    for (int n = 0; n < 160; n++) begin adc_fifo_i.push_back(sr[n % 16]); adc_fifo_q.push_back(si[n % 16]); end
    for (int s = 0; s < 2 + 1 + DATA_SYMS; s++) begin
      for (int k = 0; k < 64; k++) begin
        if (s < 2) begin dr = ltsx(k); di = 0.0; end
        else begin
          dr = ltsx(k) == 0 ? 0.0 : (2.0 * ($urandom % 4) - 3.0) / 3.0;
          di = ltsx(k) == 0 ? 0.0 : (2.0 * ($urandom % 4) - 3.0) / 3.0;
          dre.push_back(dr); dim.push_back(di);
        end
        yr[k] = AMP * (dr * hr[k] - di * hi[k]);
        yi[k] = AMP * (dr * hi[k] + di * hr[k]);
      end
      if (s == 0) begin l1r = yr; l1i = yi; end
      idft(yr, yi, xr, xi);
      if (s == 0)      for (int n = 32; n < 64; n++) begin adc_fifo_i.push_back(xr[n]); adc_fifo_q.push_back(xi[n]); end
      else if (s >= 2) for (int n = 48; n < 64; n++) begin adc_fifo_i.push_back(xr[n]); adc_fifo_q.push_back(xi[n]); end
      for (int n = 0; n < 64; n++) begin adc_fifo_i.push_back(xr[n]); adc_fifo_q.push_back(xi[n]); end
    end
  endtask

  // every AD sample the board registered, in order
  int adc_log_i[$], adc_log_q[$];
  always @(posedge clk_bb) begin
    adc_log_i.push_back(int'(signed'(adc_i))); adc_log_q.push_back(int'(signed'(adc_q)));
  end

  // send `total` Rx FIFO words to the host in packets of at most 368 words;
  // returns the words received, in order
  task automatic send_to_host(input int total, output logic [31:0] words[$], output int packets);
    logic [7:0] hdr[$], got[$];
    bit ok;
    int left, n;
    words = {}; packets = 0; left = total;
    while (left > 0) begin
      n = left > 368 ? 368 : left;
      make_header(hdr, 4 * n);
      foreach (hdr[i]) wr(8'h40 + 8'(i), hdr[i]);
      wr(8'h04, 8'(n)); wr(8'h05, 8'(n >> 8));
      wr(8'h00, 8'h80);
      wr(8'h00, 8'h01);
      wait_status(8'h01, 1, 1'b1);
      phy_take(got, ok);
      check(ok && got.size() == 42 + 4 * n, $sformatf("packet %0d: FCS %0d, %0d bytes", packets, ok, got.size()));
      for (int i = 0; i < n && 42 + 4 * i + 3 < got.size(); i++)
        words.push_back({got[42+4*i], got[43+4*i], got[44+4*i], got[45+4*i]});
      packets++;
      left -= n;
    end
  endtask

  initial begin
    logic [7:0] d;
    logic [31:0] words[$];
    int packets, cnt, start, frame_at, bad;
    real err_sum;
    real hr[64], hi[64], exp_re[$], exp_im[$], l1r[64], l1i[64];
    #1 rst_sys_n = 0; rst_bb_n = 0;
    #500 rst_sys_n = 1; rst_bb_n = 1;
    repeat (10) @(posedge clk_sys);
    adc_frames = 1;

    // ======== 1. equaliser output of a whole frame ========
    begin
      real ta[3] = '{1.0, 0.3, 0.1};
      int  td[3] = '{0, 2, 5};
      real tp[3], ang;
      for (int l = 0; l < 3; l++) tp[l] = 6.2831853 * ($urandom % 1000) / 1000.0;
      for (int k = 0; k < 64; k++) begin
        hr[k] = 0.0; hi[k] = 0.0;
        for (int l = 0; l < 3; l++) begin
          ang = tp[l] - 6.283185307179586 * k * td[l] / 64.0;
          hr[k] += ta[l] * $cos(ang); hi[k] += ta[l] * $sin(ang);
        end
      end
    end
    wr(8'h02, 8'h05);                       // full duplex, RX_SRC = equaliser
    wr(8'h08, 8'(1472)); wr(8'h09, 8'(1472 >> 8));
    wr(8'h00, 8'h84);
    repeat (20) @(posedge clk_sys);
    send_frame(hr, hi, exp_re, exp_im, l1r, l1i);
    wait_status(8'h01, 6, 1'b0);
    rd(8'h0A, d); cnt = d; rd(8'h0B, d); cnt += 256 * d;
    check(cnt == 1472, $sformatf("Rx FIFO holds %0d equalised values", cnt));
    check(cap_dropped == 0, "no value dropped");
    send_to_host(1472, words, packets);
    check(packets == 4, $sformatf("%0d packets", packets));
    check(words.size() == 1472, $sformatf("%0d values returned", words.size()));
    // each value must decode to the transmitted point: within half the
    // 16-QAM spacing (2/3, i.e. 1365 at 12 fraction bits) in each component.
    // The error is mostly FFT rounding of the channel estimate, largest on
    // weak subcarriers; its mean must stay small.
    bad = 0; err_sum = 0.0;
    foreach (words[s]) begin
      int re, im;
      real er, ei;
      re = int'(signed'(words[s][31:16])); im = int'(signed'(words[s][15:0]));
      er = absr(re - 4096.0 * exp_re[s]); ei = absr(im - 4096.0 * exp_im[s]);
      if (er >= 1365.0 || ei >= 1365.0) bad++;
      err_sum += er + ei;
    end
    check(bad == 0, $sformatf("%0d of 1472 equalised values decode to a wrong 16-QAM point", bad));
    check(err_sum / 2944.0 < 100.0, $sformatf("mean error %0.1f (4096 = 1.0)", err_sum / 2944.0));
    $display("equalised frame: mean error %0.1f of 4096", err_sum / 2944.0);

    // ======== 2. raw samples: frame plus gap ========
    wait (!sync_locked);
    wr(8'h02, 8'h01);                       // full duplex, RX_SRC = AD samples
    wr(8'h08, 8'(2571)); wr(8'h09, 8'(2571 >> 8));
    adc_log_i = {}; adc_log_q = {};
    wr(8'h00, 8'h84);
    repeat (20) @(posedge clk_bb);
    frame_at = adc_log_i.size();            // the frame's first sample is logged here or later
    send_frame(hr, hi, exp_re, exp_im, l1r, l1i);
    frame_at += 101;                        // after the noise lead-in, one clock to the pins
    wait_status(8'h01, 6, 1'b0);
    rd(8'h0A, d); cnt = d; rd(8'h0B, d); cnt += 256 * d;
    check(cnt == 2571, $sformatf("Rx FIFO holds %0d samples", cnt));
    send_to_host(2571, words, packets);
    check(packets == 7, $sformatf("%0d packets", packets));
    check(words.size() == 2571, $sformatf("%0d samples returned", words.size()));
    // locate the first returned sample in the AD log, then compare the run
    start = -1;
    for (int i = 0; i + 2571 <= adc_log_i.size() && start < 0; i++) begin
      bit m;
      m = 1;
      for (int j = 0; j < 8 && m; j++)
        if (int'(signed'(words[j][31:16])) != adc_log_i[i+j] || int'(signed'(words[j][15:0])) != adc_log_q[i+j]) m = 0;
      if (m) start = i;
    end
    check(start >= 0, "returned samples found in the AD stream");
    bad = 0;
    if (start >= 0)
      foreach (words[j])
        if (int'(signed'(words[j][31:16])) != adc_log_i[start+j] || int'(signed'(words[j][15:0])) != adc_log_q[start+j]) bad++;
    check(bad == 0, $sformatf("%0d samples differ from the AD stream", bad));
    // within 3 samples of where the testbench put it
    check(start >= 0 && start <= frame_at + 3 && frame_at + 2160 <= start + 2571 + 3,
          $sformatf("whole frame inside the capture (capture at %0d, frame at %0d)", start, frame_at));
    check(n_collision == 0, "no collision on the full-duplex link");
    check(n_sync >= 1, "synchroniser found the frame");
    check(n_clip == 0, "generated frames within the converter range");
    $display("workload: %0d packets of at most 368 samples, %0d MAC frames", 4 + 7, n_tx_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
