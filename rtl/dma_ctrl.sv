// dma_ctrl: DMA controller and MCU register block of the baseband board.
//
// The 8051-class MCU is far too slow to copy sample data, so it only builds
// and reads packet headers; this block moves the payload between the
// Ethernet MAC and the two sample FIFOs.
//
// Sending (Rx FIFO -> host): the MCU writes an Ethernet/IPv4/UDP header of
// HDR_LEN bytes into the header window, sets TX_WORDS and writes CTRL.TX_GO.
// The DMA streams the header bytes to the MAC, then TX_WORDS words from the
// Rx FIFO, four bytes per word (I high byte, I low, Q high, Q low), marks
// the last byte, and waits for the MAC to report the frame sent or given up.
// An empty Rx FIFO stalls the stream (the MAC only starts sending once the
// whole frame is in its buffer, so a stall never reaches the wire).
//
// Receiving (host -> Tx FIFO): CTRL.RX_ARM accepts the next frame that starts
// after it. Its first HDR_LEN bytes go to the receive header buffer for the
// MCU; the payload is packed four bytes to a word into the Tx FIFO. When
// HDR_LEN is at least 40 the UDP length field (bytes 38-39) limits the
// payload, so Ethernet padding of short frames is not taken as samples. At
// the end of the frame RX_DONE is set with the MAC's CRC verdict. A word that
// meets a full Tx FIFO is dropped and RX_OVF is set. Payload of a frame with
// a bad CRC has already entered the Tx FIFO; the flag tells the MCU.
//
// Sampling: CTRL.CAP_GO asks the capture controller in the baseband clock
// domain (toggle handshake) to write CAP_LEN samples into the Rx FIFO.
// Playback: CTRL.PLAY_GO likewise asks the playout controller to send
// PLAY_LEN samples from the Tx FIFO to the DA converter.
//
// Register map (8-bit MCU bus, byte addresses):
//   0x00 CTRL      W  [0] TX_GO [1] RX_ARM [2] CAP_GO [3] PLAY_GO
//                     [7] clear sticky flags
//   0x01 STATUS    R  [0] TX_BUSY [1] TX_DONE [2] TX_ABORT [3] RX_DONE
//                     [4] RX_GOOD [5] RX_ARMED [6] CAP_BUSY [7] RX_OVF
//   0x02 CFG       RW [0] FULL_DUPLEX (reset 1) [2:1] RX_SRC (0 converter
//                     samples, 1 FFT output, 2 equaliser output)
//   0x03 HDR_LEN   RW header bytes, reset 42
//   0x04/0x05      RW TX_WORDS low/high
//   0x06/0x07      R  RX_BYTES low/high, payload bytes of the last frame
//   0x08/0x09      RW CAP_LEN low/high
//   0x0A/0x0B      R  words waiting in the Rx FIFO
//   0x0C/0x0D      RW PLAY_LEN low/high
//   0x0E STATUS2   R  [0] PLAY_BUSY
//   0x40..0x7F     W  transmit header buffer, R receive header buffer
// bus_rdata is combinational from bus_addr. All of this is this design's
// choice; the document gives the division of work between MCU and DMA.
module dma_ctrl
  import testbed_pkg::*;
#(
  parameter int unsigned FIFO_AW = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  // MCU bus
  input  logic [7:0]        bus_addr,
  input  logic [7:0]        bus_wdata,
  input  logic              bus_we,
  output logic [7:0]        bus_rdata,
  // MAC transmit stream and status
  output logic [7:0]        mac_tx_data,
  output logic              mac_tx_valid,
  output logic              mac_tx_last,
  input  logic              mac_tx_ready,
  input  logic              mac_tx_done,
  input  logic              mac_tx_abort,
  // MAC receive stream
  input  logic [7:0]        mac_rx_data,
  input  logic              mac_rx_valid,
  input  logic              mac_rx_eof,
  input  logic              mac_rx_good,
  // Rx FIFO read side (samples to the host)
  output logic              rxf_rd_en,
  input  logic [WORD_W-1:0] rxf_data,
  input  logic              rxf_empty,
  input  logic [FIFO_AW:0]  rxf_count,
  // Tx FIFO write side (samples from the host)
  output logic              txf_wr_en,
  output logic [WORD_W-1:0] txf_data,
  input  logic              txf_full,
  // configuration and sampling handshake
  output logic              full_duplex,
  output logic [1:0]        rx_src,
  output logic              cap_req_tog,
  output logic [15:0]       cap_len,
  input  logic              cap_done_tog,
  output logic              play_req_tog,
  output logic [15:0]       play_len,
  input  logic              play_done_tog,
  output logic              tx_stall     // high while waiting on an empty Rx FIFO
);
  typedef enum logic [1:0] { D_IDLE, D_HDR, D_PAY, D_WAIT } dtx_e;

  logic [7:0]  tx_hdr [64];
  logic [7:0]  rx_hdr [64];
  logic [7:0]  hdr_len;
  logic [15:0] tx_words;
  logic [15:0] rx_bytes;
  logic        st_tx_done, st_tx_abort, st_rx_done, st_rx_good, st_rx_ovf;
  logic        rx_armed, rx_active, rx_mid, cap_busy;
  logic [1:0]  cap_sync;
  logic        cap_seen;

  // ---------------- register writes ----------------
  logic wr_ctrl;
  assign wr_ctrl = bus_we && bus_addr == 8'h00;

  always_ff @(posedge clk) begin
    if (bus_we && bus_addr[7:6] == 2'b01) tx_hdr[bus_addr[5:0]] <= bus_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_duplex <= 1'b1;
      rx_src      <= 2'd0;
      hdr_len     <= 8'(HDR_BYTES);
      tx_words    <= '0;
      cap_len     <= '0;
      play_len    <= '0;
    end else if (bus_we) begin
      case (bus_addr)
        8'h02: {rx_src, full_duplex} <= bus_wdata[2:0];
        8'h03: hdr_len        <= (bus_wdata > 8'd64) ? 8'd64 : bus_wdata;
        8'h04: tx_words[7:0]  <= bus_wdata;
        8'h05: tx_words[15:8] <= bus_wdata;
        8'h08: cap_len[7:0]   <= bus_wdata;
        8'h09: cap_len[15:8]  <= bus_wdata;
        8'h0C: play_len[7:0]  <= bus_wdata;
        8'h0D: play_len[15:8] <= bus_wdata;
        default: ;
      endcase
    end
  end

  // ---------------- transmit DMA ----------------
  dtx_e        tstate;
  logic [6:0]  hidx;
  logic [15:0] wleft;
  logic [1:0]  bsel;

  always_comb begin
    mac_tx_data  = '0;
    mac_tx_valid = 1'b0;
    mac_tx_last  = 1'b0;
    rxf_rd_en    = 1'b0;
    tx_stall     = 1'b0;
    case (tstate)
      D_HDR: begin
        mac_tx_data  = tx_hdr[hidx[5:0]];
        mac_tx_valid = 1'b1;
        mac_tx_last  = (8'(hidx) == hdr_len - 8'd1) && (wleft == 0);
      end
      D_PAY: begin
        tx_stall     = rxf_empty;
        mac_tx_valid = !rxf_empty;
        case (bsel)
          2'd0:    mac_tx_data = rxf_data[31:24];
          2'd1:    mac_tx_data = rxf_data[23:16];
          2'd2:    mac_tx_data = rxf_data[15:8];
          default: mac_tx_data = rxf_data[7:0];
        endcase
        mac_tx_last  = (wleft == 16'd1) && (bsel == 2'd3);
        rxf_rd_en    = !rxf_empty && mac_tx_ready && (bsel == 2'd3);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate      <= D_IDLE;
      hidx        <= '0;
      wleft       <= '0;
      bsel        <= '0;
      st_tx_done  <= 1'b0;
      st_tx_abort <= 1'b0;
    end else begin
      if (wr_ctrl && bus_wdata[7]) begin
        st_tx_done  <= 1'b0;
        st_tx_abort <= 1'b0;
      end
      case (tstate)
        D_IDLE: if (wr_ctrl && bus_wdata[0]) begin
          hidx        <= '0;
          bsel        <= '0;
          wleft       <= tx_words;
          st_tx_done  <= 1'b0;
          st_tx_abort <= 1'b0;
          tstate      <= (hdr_len != 0) ? D_HDR : (tx_words != 0) ? D_PAY : D_IDLE;
        end
        D_HDR: if (mac_tx_ready) begin
          if (8'(hidx) == hdr_len - 8'd1) tstate <= (wleft == 0) ? D_WAIT : D_PAY;
          hidx <= hidx + 1'b1;
        end
        D_PAY: if (mac_tx_valid && mac_tx_ready) begin
          bsel <= bsel + 1'b1;
          if (bsel == 2'd3) begin
            wleft <= wleft - 1'b1;
            if (wleft == 16'd1) tstate <= D_WAIT;
          end
        end
        D_WAIT: if (mac_tx_done || mac_tx_abort) begin
          st_tx_done  <= mac_tx_done;
          st_tx_abort <= mac_tx_abort;
          tstate      <= D_IDLE;
        end
        default: tstate <= D_IDLE;
      endcase
    end
  end

  // ---------------- receive DMA ----------------
  logic [15:0] ridx;        // byte index within the frame
  logic [15:0] pay_limit;
  logic [23:0] pack;
  logic [1:0]  pcnt;

  // Index and ownership of the byte on mac_rx_data; a byte arriving while no
  // frame is open starts a new frame at index 0.
  logic        first_byte, act, is_hdr, take_pay;
  logic [15:0] cur_idx, bytes_base, limit_cur;
  logic [1:0]  pcnt_base;
  assign first_byte = mac_rx_valid && !rx_mid;
  assign cur_idx    = first_byte ? 16'd0 : ridx;
  assign act        = first_byte ? rx_armed : rx_active;
  assign is_hdr     = cur_idx < 16'(hdr_len);
  assign bytes_base = first_byte ? 16'd0 : rx_bytes;
  assign pcnt_base  = first_byte ? 2'd0 : pcnt;
  assign limit_cur  = first_byte ? 16'hFFFF : pay_limit;
  assign take_pay   = mac_rx_valid && act && !is_hdr && (bytes_base < limit_cur);

  always_ff @(posedge clk) begin
    if (mac_rx_valid && act && is_hdr) rx_hdr[cur_idx[5:0]] <= mac_rx_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_armed   <= 1'b0;
      rx_active  <= 1'b0;
      rx_mid     <= 1'b0;
      ridx       <= '0;
      rx_bytes   <= '0;
      pay_limit  <= '1;
      pack       <= '0;
      pcnt       <= '0;
      txf_wr_en  <= 1'b0;
      txf_data   <= '0;
      st_rx_done <= 1'b0;
      st_rx_good <= 1'b0;
      st_rx_ovf  <= 1'b0;
    end else begin
      txf_wr_en <= 1'b0;
      if (wr_ctrl && bus_wdata[7]) begin
        st_rx_done <= 1'b0;
        st_rx_good <= 1'b0;
        st_rx_ovf  <= 1'b0;
      end
      if (wr_ctrl && bus_wdata[1]) begin
        rx_armed   <= 1'b1;
        st_rx_done <= 1'b0;
      end
      if (mac_rx_valid) begin
        rx_mid   <= 1'b1;
        ridx     <= cur_idx + 1'b1;
        rx_bytes <= bytes_base + 16'(take_pay);
        pcnt     <= pcnt_base + 2'(take_pay);
        if (first_byte) begin
          rx_active <= rx_armed;
          rx_armed  <= 1'b0;
          pay_limit <= '1;
        end
        // UDP length field, bytes 38 and 39 of the header
        if (act && hdr_len >= 8'd40) begin
          if (cur_idx == 16'd38) pay_limit[15:8] <= mac_rx_data;
          if (cur_idx == 16'd39) pay_limit       <= {pay_limit[15:8], mac_rx_data} - 16'd8;
        end
        if (take_pay) begin
          pack <= {pack[15:0], mac_rx_data};
          if (pcnt_base == 2'd3) begin
            if (txf_full) st_rx_ovf <= 1'b1;
            else begin
              txf_wr_en <= 1'b1;
              txf_data  <= {pack, mac_rx_data};
            end
          end
        end
      end
      if (mac_rx_eof) begin
        rx_mid <= 1'b0;
        if (rx_active) begin
          rx_active  <= 1'b0;
          st_rx_done <= 1'b1;
          st_rx_good <= mac_rx_good;
        end
      end
    end
  end

  // ---------------- sampling handshake ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_req_tog <= 1'b0;
      cap_sync    <= '0;
      cap_seen    <= 1'b0;
      cap_busy    <= 1'b0;
    end else begin
      cap_sync <= {cap_sync[0], cap_done_tog};
      if (wr_ctrl && bus_wdata[2] && !cap_busy) begin
        cap_req_tog <= ~cap_req_tog;
        cap_busy    <= 1'b1;
      end else if (cap_sync[1] != cap_seen) begin
        cap_seen <= cap_sync[1];
        cap_busy <= 1'b0;
      end
    end
  end

  logic [1:0] play_sync;
  logic       play_seen, play_busy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      play_req_tog <= 1'b0;
      play_sync    <= '0;
      play_seen    <= 1'b0;
      play_busy    <= 1'b0;
    end else begin
      play_sync <= {play_sync[0], play_done_tog};
      if (wr_ctrl && bus_wdata[3] && !play_busy) begin
        play_req_tog <= ~play_req_tog;
        play_busy    <= 1'b1;
      end else if (play_sync[1] != play_seen) begin
        play_seen <= play_sync[1];
        play_busy <= 1'b0;
      end
    end
  end

  // ---------------- register reads ----------------
  always_comb begin
    bus_rdata = '0;
    if (bus_addr[7:6] == 2'b01) bus_rdata = rx_hdr[bus_addr[5:0]];
    else case (bus_addr)
      8'h01: bus_rdata = {st_rx_ovf, cap_busy, rx_armed, st_rx_good, st_rx_done,
                          st_tx_abort, st_tx_done, tstate != D_IDLE};
      8'h02: bus_rdata = {5'd0, rx_src, full_duplex};
      8'h03: bus_rdata = hdr_len;
      8'h04: bus_rdata = tx_words[7:0];
      8'h05: bus_rdata = tx_words[15:8];
      8'h06: bus_rdata = rx_bytes[7:0];
      8'h07: bus_rdata = rx_bytes[15:8];
      8'h08: bus_rdata = cap_len[7:0];
      8'h09: bus_rdata = cap_len[15:8];
      8'h0A: bus_rdata = 8'(rxf_count);
      8'h0B: bus_rdata = 8'(rxf_count >> 8);
      8'h0C: bus_rdata = play_len[7:0];
      8'h0D: bus_rdata = play_len[15:8];
      8'h0E: bus_rdata = {7'd0, play_busy};
      default: ;
    endcase
  end

  // the transmit stream only pops the Rx FIFO when a word is there
  a_no_pop_empty: assert property (@(posedge clk) rxf_rd_en |-> !rxf_empty);
endmodule
