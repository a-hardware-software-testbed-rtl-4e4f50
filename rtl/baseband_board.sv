// baseband_board: FPGA logic of the baseband processing board of an OFDM
// hardware/software testbed.
//
// The board links a host PC, which runs part of an OFDM baseband in
// software, to a radio front-end, with baseband hardware under test in
// between. Samples travel between host and board in UDP packets over
// Ethernet; an 8051-class MCU (outside this module, on the bus ports) builds
// and reads the packet headers and drives everything through registers, and
// a DMA moves the payload:
//
//   host -> MAC -> DMA -> Tx FIFO -> playout -> DA converter -> RF
//   RF -> AD converter -> [synchroniser] -> FFT -> equaliser -> capture
//      -> Rx FIFO -> DMA -> MAC -> host
//
// The two FIFOs are dual-clock: the MCU, DMA and MAC run on clk_sys (16 MHz
// in the reference board) and the converters and the hardware under test on
// clk_bb (the 20 MHz converter clock). The hardware under test is the
// receive chain of FFT and LS equaliser; CFG.RX_SRC selects what the Rx FIFO
// records: the converter samples, the FFT output (the host then equalises in
// software) or the equaliser output (the hardware equaliser is checked
// against the software one). The frame synchroniser watches every converter
// sample, finds the long training symbols and hands the symbols of the frame,
// cyclic prefixes removed, to the FFT at the FFT's pace (320 clocks per
// symbol); sync_locked is high while it holds a frame. The RF front-end is
// configured through the SPI master.
//
// MCU bus: addresses 0x00-0x7F go to the DMA registers and header buffers
// (see dma_ctrl), 0x80-0x83 to the SPI master. bus_rdata is combinational.
// Converter samples are 12-bit two's complement, sign-extended to the 16-bit
// halves of a FIFO word. The dataflow follows the board described for the
// testbed; the register map, the sampling and playback requests and all
// widths beyond the converters' 12 bits are this design's choices.
module baseband_board
  import testbed_pkg::*;
#(
  parameter int unsigned FIFO_AW  = 12,   // 4096-word sample FIFOs
  parameter int unsigned BUF_AW   = 11,   // 2048-byte MAC transmit buffer
  parameter int unsigned OUT_FRAC = 12    // equaliser output fraction bits
) (
  input  logic              clk_sys,
  input  logic              rst_sys_n,
  input  logic              clk_bb,
  input  logic              rst_bb_n,
  // MCU bus
  input  logic [7:0]        bus_addr,
  input  logic [7:0]        bus_wdata,
  input  logic              bus_we,
  output logic [7:0]        bus_rdata,
  // Ethernet PHY (MII)
  input  logic              mii_tx_clk,
  output logic [3:0]        mii_txd,
  output logic              mii_tx_en,
  input  logic              mii_rx_clk,
  input  logic [3:0]        mii_rxd,
  input  logic              mii_rx_dv,
  input  logic              mii_rx_er,
  input  logic              mii_crs,
  input  logic              mii_col,
  // RF front-end configuration
  output logic              spi_sclk,
  output logic              spi_mosi,
  input  logic              spi_miso,
  output logic              spi_cs_n,
  // converters
  input  logic [ADC_W-1:0]  adc_i,
  input  logic [ADC_W-1:0]  adc_q,
  output logic [ADC_W-1:0]  dac_i,
  output logic [ADC_W-1:0]  dac_q,
  output logic              dac_valid,
  // synchroniser holds a frame (clk_bb)
  output logic              sync_locked,
  // observation: transmit attempts of the last frame, DMA waiting on an
  // empty Rx FIFO (clk_sys); samples lost at a full Rx FIFO in the last
  // capture and empty-FIFO samples in the last playback (clk_bb)
  output logic [4:0]        mac_tx_attempts,
  output logic              dma_tx_stall,
  output logic [15:0]       cap_dropped,
  output logic [15:0]       play_underruns
);
  // ---------------- system clock domain ----------------
  logic [7:0]  dma_rdata, spi_rdata;
  logic        spi_sel;
  assign spi_sel   = bus_addr[7];
  assign bus_rdata = spi_sel ? spi_rdata : dma_rdata;

  logic [7:0] mtx_data;  logic mtx_valid, mtx_last, mtx_ready, mtx_busy, mtx_done, mtx_abort;
  logic [4:0] mtx_attempts;
  logic [7:0] mrx_data;  logic mrx_valid, mrx_eof, mrx_good;
  logic       full_duplex, tx_stall;
  logic [1:0] rx_src;
  assign mac_tx_attempts = mtx_attempts;
  assign dma_tx_stall    = tx_stall;

  logic              rxf_rd_en, rxf_empty;
  logic [WORD_W-1:0] rxf_rd_data;
  logic [FIFO_AW:0]  rxf_rd_count;
  logic              txf_wr_en, txf_full;
  logic [WORD_W-1:0] txf_wr_data;
  logic              cap_req_tog, cap_done_tog, play_req_tog, play_done_tog;
  logic [15:0]       cap_len, play_len;

  eth_mac #(.BUF_AW(BUF_AW)) u_mac (
    .clk(clk_sys), .rst_n(rst_sys_n), .full_duplex,
    .tx_data(mtx_data), .tx_valid(mtx_valid), .tx_last(mtx_last), .tx_ready(mtx_ready),
    .tx_busy(mtx_busy), .tx_done(mtx_done), .tx_abort(mtx_abort), .tx_attempts(mtx_attempts),
    .rx_data(mrx_data), .rx_valid(mrx_valid), .rx_eof(mrx_eof), .rx_good(mrx_good),
    .mii_tx_clk, .mii_txd, .mii_tx_en, .mii_rx_clk, .mii_rxd, .mii_rx_dv, .mii_rx_er,
    .mii_crs, .mii_col);

  dma_ctrl #(.FIFO_AW(FIFO_AW)) u_dma (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .bus_addr, .bus_wdata, .bus_we(bus_we && !spi_sel), .bus_rdata(dma_rdata),
    .mac_tx_data(mtx_data), .mac_tx_valid(mtx_valid), .mac_tx_last(mtx_last),
    .mac_tx_ready(mtx_ready), .mac_tx_done(mtx_done), .mac_tx_abort(mtx_abort),
    .mac_rx_data(mrx_data), .mac_rx_valid(mrx_valid), .mac_rx_eof(mrx_eof),
    .mac_rx_good(mrx_good),
    .rxf_rd_en, .rxf_data(rxf_rd_data), .rxf_empty, .rxf_count(rxf_rd_count),
    .txf_wr_en, .txf_data(txf_wr_data), .txf_full,
    .full_duplex, .rx_src, .cap_req_tog, .cap_len, .cap_done_tog,
    .play_req_tog, .play_len, .play_done_tog, .tx_stall);

  spi_master u_spi (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .bus_sel(spi_sel), .bus_addr(bus_addr[1:0]), .bus_wdata, .bus_we, .bus_rdata(spi_rdata),
    .spi_sclk, .spi_mosi, .spi_miso, .spi_cs_n, .busy());

  // ---------------- FIFOs between the domains ----------------
  logic              txf_rd_en, txf_empty;
  logic [WORD_W-1:0] txf_rd_data;
  logic              rxf_wr_en, rxf_full;
  logic [WORD_W-1:0] rxf_wr_data;

  async_fifo #(.DATA_W(WORD_W), .ADDR_W(FIFO_AW)) u_tx_fifo (
    .wr_clk(clk_sys), .wr_rst_n(rst_sys_n), .wr_en(txf_wr_en), .wr_data(txf_wr_data),
    .wr_full(txf_full), .wr_count(),
    .rd_clk(clk_bb), .rd_rst_n(rst_bb_n), .rd_en(txf_rd_en), .rd_data(txf_rd_data),
    .rd_empty(txf_empty), .rd_count());

  async_fifo #(.DATA_W(WORD_W), .ADDR_W(FIFO_AW)) u_rx_fifo (
    .wr_clk(clk_bb), .wr_rst_n(rst_bb_n), .wr_en(rxf_wr_en), .wr_data(rxf_wr_data),
    .wr_full(rxf_full), .wr_count(),
    .rd_clk(clk_sys), .rd_rst_n(rst_sys_n), .rd_en(rxf_rd_en), .rd_data(rxf_rd_data),
    .rd_empty(rxf_empty), .rd_count(rxf_rd_count));

  // ---------------- baseband clock domain ----------------
  // transmit: Tx FIFO to the DA converter
  playout_ctrl u_play (
    .clk(clk_bb), .rst_n(rst_bb_n), .req_tog(play_req_tog), .play_len,
    .done_tog(play_done_tog), .busy(),
    .fifo_rd_en(txf_rd_en), .fifo_rd_data(txf_rd_data), .fifo_empty(txf_empty),
    .dac_i, .dac_q, .dac_valid, .underruns(play_underruns));

  // receive: converter samples, registered once
  logic [ADC_W-1:0] adc_i_q, adc_q_q;
  always_ff @(posedge clk_bb or negedge rst_bb_n) begin
    if (!rst_bb_n) begin
      adc_i_q <= '0; adc_q_q <= '0;
    end else begin
      adc_i_q <= adc_i; adc_q_q <= adc_q;
    end
  end

  // frame synchroniser
  logic      sy_valid, sy_ready;
  cplx_t     sy_data, adc_cplx;
  sym_kind_e sy_kind;
  assign adc_cplx = '{re: SAMPLE_W'(signed'(adc_i_q)), im: SAMPLE_W'(signed'(adc_q_q))};
  ofdm_sync u_sync (
    .clk(clk_bb), .rst_n(rst_bb_n),
    .in_valid(1'b1), .in_data(adc_cplx),
    .out_valid(sy_valid), .out_ready(sy_ready), .out_data(sy_data), .out_kind(sy_kind),
    .locked(sync_locked), .frame_found());

  // FFT and equaliser under test (bin indices are implied by the order of
  // the values in the Rx FIFO and are not stored)
  logic       fd_valid;
  cplx_t      fd_data;
  logic [5:0] fd_idx;
  sym_kind_e  fd_kind;
  fft64 u_fft (
    .clk(clk_bb), .rst_n(rst_bb_n),
    .in_valid(sy_valid), .in_ready(sy_ready), .in_data(sy_data), .in_kind(sy_kind),
    .out_valid(fd_valid), .out_data(fd_data), .out_idx(fd_idx), .out_kind(fd_kind));

  logic       eq_valid;
  cplx_t      eq_data;
  logic [5:0] eq_idx;
  ls_equalizer #(.OUT_FRAC(OUT_FRAC)) u_eq (
    .clk(clk_bb), .rst_n(rst_bb_n),
    .in_valid(fd_valid), .in_data(fd_data), .in_idx(fd_idx), .in_kind(fd_kind),
    .out_valid(eq_valid), .out_data(eq_data), .out_idx(eq_idx));

  // source of the Rx FIFO, selected by CFG.RX_SRC (quasi-static, synchronised)
  logic [1:0]        src_s1, src_s2;
  logic              src_valid;
  logic [WORD_W-1:0] src_data;
  always_ff @(posedge clk_bb or negedge rst_bb_n) begin
    if (!rst_bb_n) begin
      src_s1 <= '0; src_s2 <= '0;
    end else begin
      src_s1 <= rx_src; src_s2 <= src_s1;
    end
  end
  always_comb begin
    case (src_s2)
      2'd1: begin
        src_valid = fd_valid;
        src_data  = fd_data;
      end
      2'd2, 2'd3: begin
        src_valid = eq_valid;
        src_data  = eq_data;
      end
      default: begin
        src_valid = 1'b1;
        src_data  = adc_cplx;
      end
    endcase
  end

  capture_ctrl u_cap (
    .clk(clk_bb), .rst_n(rst_bb_n), .req_tog(cap_req_tog), .cap_len,
    .done_tog(cap_done_tog), .busy(),
    .s_valid(src_valid), .s_data(src_data),
    .fifo_wr_en(rxf_wr_en), .fifo_wr_data(rxf_wr_data), .fifo_full(rxf_full),
    .dropped(cap_dropped));
endmodule
