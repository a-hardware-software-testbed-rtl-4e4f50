// tb_baseband_board: end-to-end test of the baseband board at its default
// sizes. The testbench plays the MCU (register bus), the host and PHY
// (Ethernet frames on MII), the RF side (AD samples in, DA samples out), the
// RF front-end's SPI port. Received OFDM frames are generated here in the
// time domain, as the AD converter would deliver them.
//
// Sequence: configure the RF front-end over SPI; the host sends samples in a
// UDP packet which the board plays out to the DA converter (and a corrupted
// copy that must be flagged); the host requests raw AD samples, which are
// captured and returned in a UDP packet; in equaliser mode a whole frame
// (short training, guard, two long training symbols, SIGNAL and 22 data
// symbols with cyclic prefixes, after noise) through a multipath channel is
// found by the synchroniser, passes the FFT and the first two symbols after
// the training come back equalised, with the DMA stalling on the still-empty
// Rx FIFO; in FFT mode the first long training symbol of another frame comes
// back as its subcarrier values; a half-duplex collision forces a
// resend; finally a capture longer than the Rx FIFO overflows it.
// Each of these mechanisms is counted and must have happened.
`timescale 1ns/1ps
module tb_baseband_board;
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

  // ---------------- mechanism counters ----------------
  int n_spi = 0, n_rx_good = 0, n_crc_reject = 0, n_play = 0, n_cap_raw = 0;
  int n_cap_eq = 0, n_cap_fft = 0, n_stall = 0, n_collision = 0, n_overflow = 0, n_tx_frames = 0;
  always @(posedge clk_sys) if (dma_tx_stall) n_stall++;

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

  // ---------------- DA monitor ----------------
  logic [2*ADC_W-1:0] dac_got[$];
  always @(posedge clk_bb) if (dac_valid) dac_got.push_back({dac_i, dac_q});

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

  logic [7:0] cfg_bytes [3] = '{8'h12, 8'h34, 8'h56};

  initial begin
    logic [7:0] d, hdr[$], f[$], got[$];
    logic [31:0] words[$];
    bit ok;
    int base;
    real hr[64], hi[64], exp_re[$], exp_im[$], l1r[64], l1i[64];
    #1 rst_sys_n = 0; rst_bb_n = 0;
    #500 rst_sys_n = 1; rst_bb_n = 1;
    repeat (10) @(posedge clk_sys);

    // ======== 1. RF front-end configuration over SPI ========
    wr(8'h81, 8'h01);
    for (int i = 0; i < 3; i++) begin
      wr(8'h80, cfg_bytes[i]);
      wait_status(8'h81, 7, 1'b0);
      n_spi++;
    end
    wr(8'h81, 8'h00);
    check(spi_bytes.size() == 3 && spi_bytes[0] == 8'h12 && spi_bytes[1] == 8'h34 &&
          spi_bytes[2] == 8'h56, "RF configuration bytes");

    // ======== 2. host sends baseband samples (UDP), board plays them ========
    words = {};
    for (int i = 0; i < 64; i++) words.push_back($urandom);
    make_header(hdr, 256);
    f = hdr;
    foreach (words[i]) for (int b = 3; b >= 0; b--) f.push_back(words[i][8*b +: 8]);
    wr(8'h00, 8'h02);                       // arm receive
    phy_send(f, 1'b0);
    wait_status(8'h01, 3, 1'b1);
    rd(8'h01, d); check(d[4], "received frame good");
    if (d[4]) n_rx_good++;
    rd(8'h06, d); check(d == 8'd0, "RX_BYTES low"); rd(8'h07, d); check(d == 8'd1, "RX_BYTES = 256");
    for (int i = 0; i < 42; i += 7) begin rd(8'h40 + 8'(i), d); check(d == hdr[i], "header for MCU"); end
    wr(8'h0C, 8'd64); wr(8'h0D, 8'd0);
    dac_got = {};
    wr(8'h00, 8'h08);                       // play
    wait_status(8'h0E, 0, 1'b0);
    check(dac_got.size() == 64, $sformatf("DA got %0d samples", dac_got.size()));
    ok = 1;
    foreach (dac_got[i])
      if (dac_got[i] != {words[i][SAMPLE_W +: ADC_W], words[i][0 +: ADC_W]}) ok = 0;
    check(ok, "DA samples equal the host's");
    if (ok && dac_got.size() == 64) n_play++;
    check(play_underruns == 0, "no playback underrun");
    // corrupted copy: flagged bad
    wr(8'h00, 8'h82);
    phy_send(f, 1'b1);
    wait_status(8'h01, 3, 1'b1);
    rd(8'h01, d); check(!d[4], "corrupted frame flagged");
    if (!d[4]) n_crc_reject++;

    // ======== 3. sample request: raw AD samples back to the host ========
    wr(8'h00, 8'h80);
    wr(8'h08, 8'd100); wr(8'h09, 8'd0);
    wr(8'h00, 8'h04);
    wait_status(8'h01, 6, 1'b0);
    rd(8'h0A, d); check(d == 8'd100, $sformatf("Rx FIFO holds %0d", d));
    make_header(hdr, 400);
    foreach (hdr[i]) wr(8'h40 + 8'(i), hdr[i]);
    wr(8'h04, 8'd100); wr(8'h05, 8'd0);
    wr(8'h00, 8'h01);
    wait_status(8'h01, 1, 1'b1);
    phy_take(got, ok);
    check(ok, "transmitted FCS");
    check(got.size() == 442, $sformatf("frame length %0d", got.size()));
    ok = got.size() == 442;
    for (int i = 0; i < 42 && ok; i++) if (got[i] != hdr[i]) ok = 0;
    check(ok, "header sent as written");
    base = int'(signed'({got[42], got[43]}));
    ok = got.size() == 442;
    for (int s = 0; s < 100 && ok; s++) begin
      automatic int si = int'(signed'({got[42+4*s], got[43+4*s]}));
      automatic int sq = int'(signed'({got[44+4*s], got[45+4*s]}));
      automatic int n  = base + s;
      if (si != int'(signed'(ADC_W'(n))) || sq != int'(signed'(ADC_W'(-n * 3)))) ok = 0;
    end
    check(ok, "consecutive AD samples, sign-extended");
    if (ok) n_cap_raw++;

    // ======== 4. equaliser mode, DMA stalls on the empty Rx FIFO ========
    wr(8'h02, 8'h05);                       // RX_SRC = equaliser
    wr(8'h08, 8'd128); wr(8'h09, 8'd0);
    wr(8'h00, 8'h84);                       // clear flags, capture
    make_header(hdr, 512);
    foreach (hdr[i]) wr(8'h40 + 8'(i), hdr[i]);
    wr(8'h04, 8'd128); wr(8'h05, 8'd0);
    wr(8'h00, 8'h01);                       // send before any sample exists
    repeat (200) @(posedge clk_sys);
    check(n_stall > 0, "DMA waits on empty Rx FIFO");
    // multipath channel, taps at delays 0, 1 and 3 with random phases:
    // h(k) = sum_l a_l exp(j p_l) exp(-j 2 pi k d_l / 64)
    begin
      real ta[3] = '{1.0, 0.25, 0.15};
      int  td[3] = '{0, 1, 3};
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
    adc_frames = 1;
    send_frame(hr, hi, exp_re, exp_im, l1r, l1i);
    wait_status(8'h01, 1, 1'b1);
    phy_take(got, ok);
    check(ok && got.size() == 42 + 512, "equalised frame sent");
    ok = got.size() == 554;
    for (int s = 0; s < 128 && ok; s++) begin
      automatic int re = int'(signed'({got[42+4*s], got[43+4*s]}));
      automatic int im = int'(signed'({got[44+4*s], got[45+4*s]}));
      if (absr(re - 4096.0 * exp_re[s]) > 250.0 || absr(im - 4096.0 * exp_im[s]) > 250.0) begin
        ok = 0; $display("eq value %0d: %0d,%0d want %0.0f,%0.0f", s, re, im, 4096.0 * exp_re[s], 4096.0 * exp_im[s]);
      end
    end
    check(ok, "equalised constellation");
    if (ok) n_cap_eq++;

    // ======== 4b. FFT output mode (host-side equalisation) ========
    wait (!sync_locked);                    // rest of the previous frame
    repeat (1000) @(posedge clk_bb);        // leaves the FFT
    wr(8'h02, 8'h03);                       // RX_SRC = FFT output
    wr(8'h08, 8'd64); wr(8'h09, 8'd0);
    wr(8'h00, 8'h84);
    repeat (20) @(posedge clk_sys);
    begin
      real yr[64], yi[64];
      for (int k = 0; k < 64; k++) begin hr[k] = 1.0; hi[k] = 0.0; end
      send_frame(hr, hi, exp_re, exp_im, yr, yi);
      wait_status(8'h01, 6, 1'b0);
      make_header(hdr, 256);
      foreach (hdr[i]) wr(8'h40 + 8'(i), hdr[i]);
      wr(8'h04, 8'd64); wr(8'h05, 8'd0);
      wr(8'h00, 8'h01);
      wait_status(8'h01, 1, 1'b1);
      phy_take(got, ok);
      check(ok && got.size() == 42 + 256, "FFT frame sent");
      ok = got.size() == 298;
      for (int k = 0; k < 64 && ok; k++) begin
        automatic int re = int'(signed'({got[42+4*k], got[43+4*k]}));
        automatic int im = int'(signed'({got[44+4*k], got[45+4*k]}));
        if (absr(re - yr[k]) > 3.0 || absr(im - yi[k]) > 3.0) begin
          ok = 0; $display("fft bin %0d: %0d,%0d want %0.0f,%0.0f", k, re, im, yr[k], yi[k]);
        end
      end
      check(ok, "subcarrier values from the FFT");
      if (ok) n_cap_fft++;
    end

    // ======== 5. half duplex collision and resend ========
    wr(8'h02, 8'h00);                       // half duplex, raw samples
    wr(8'h08, 8'd20); wr(8'h09, 8'd0);
    wr(8'h00, 8'h84);
    wait_status(8'h01, 6, 1'b0);
    wr(8'h04, 8'd20); wr(8'h05, 8'd0);
    force_collision = 1;
    wr(8'h00, 8'h01);
    wait_status(8'h01, 1, 1'b1);
    check(n_collision == 1 && mac_tx_attempts == 5'd2, $sformatf("resent after collision (%0d attempts)", mac_tx_attempts));
    phy_take(got, ok);
    check(ok && got.size() == 42 + 80, "resent frame intact");

    // ======== 6. capture longer than the Rx FIFO ========
    wr(8'h08, 8'h88); wr(8'h09, 8'h13);     // 5000 samples
    wr(8'h00, 8'h84);
    wait_status(8'h01, 6, 1'b0);
    check(cap_dropped == 16'd5000 - 16'd4096, $sformatf("dropped %0d", cap_dropped));
    rd(8'h0B, d); check(d == 8'h10, "Rx FIFO full (4096 words)");
    if (cap_dropped != 0) n_overflow++;

    // ======== mechanisms ========
    check(n_spi > 0, "SPI configuration happened");
    check(n_rx_good > 0, "good frame reception happened");
    check(n_crc_reject > 0, "CRC rejection happened");
    check(n_play > 0, "playback happened");
    check(n_cap_raw > 0, "raw capture happened");
    check(n_cap_eq > 0, "equaliser-mode capture happened");
    check(n_cap_fft > 0, "FFT-mode capture happened");
    check(n_sync >= 2, $sformatf("synchroniser found %0d frames", n_sync));
    check(n_clip == 0, "generated frames within the converter range");
    check(n_stall > 0, "DMA stall happened");
    check(n_collision > 0, "collision happened");
    check(n_overflow > 0, "Rx FIFO overflow happened");
    $display("mechanisms: spi=%0d rx_good=%0d crc_reject=%0d play=%0d cap_raw=%0d cap_eq=%0d cap_fft=%0d stall_cycles=%0d collision=%0d overflow=%0d tx_frames=%0d sync=%0d",
             n_spi, n_rx_good, n_crc_reject, n_play, n_cap_raw, n_cap_eq, n_cap_fft, n_stall, n_collision, n_overflow, n_tx_frames, n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
