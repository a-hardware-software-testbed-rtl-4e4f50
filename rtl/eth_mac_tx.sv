// eth_mac_tx: Ethernet transmitter of the board's MAC, half or full duplex,
// with CSMA/CD and the 32-bit frame check sequence.
//
// A frame (destination address to end of payload, no preamble, no FCS) is
// first loaded byte by byte into a local buffer through a valid/ready
// stream ending with s_last. Keeping the whole frame lets the transmitter
// resend it after a collision without asking the DMA for the data again.
// It then defers until the medium has been idle for the inter-frame gap,
// sends 7 preamble bytes, the start-frame delimiter, the frame padded with
// zeros to 60 bytes and the CRC-32, least significant nibble first on MII.
//
// In half duplex (full_duplex low) carrier sense defers the start, and a
// collision during transmission is answered with a 32-bit jam and a
// truncated binary exponential backoff of r slot times (512 bit times each,
// r uniform in 0 .. 2^min(n,10)-1 after the n-th collision, drawn from an
// LFSR); after 16 attempts the frame is dropped and tx_abort pulses. In full
// duplex carrier sense and collision are ignored.
//
// Timing: every MII step happens on a cycle where tx_ce is high (one nibble
// time); tx_done or tx_abort pulses for one cycle when the frame is finished.
// The document asks only for "CSMA/CD and 32-bit CRC" over MII; the buffer,
// the backoff source and the stream handshake are this design's choices.
module eth_mac_tx
  import testbed_pkg::*;
#(
  parameter int unsigned BUF_AW = 11   // frame buffer of 2^BUF_AW bytes
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_ce,        // one pulse per MII nibble time
  input  logic       full_duplex,
  // frame stream from the DMA / MCU
  input  logic [7:0] s_data,
  input  logic       s_valid,
  input  logic       s_last,
  output logic       s_ready,
  // MII transmit side (crs/col already synchronised)
  output logic [3:0] mii_txd,
  output logic       mii_tx_en,
  input  logic       mii_crs,
  input  logic       mii_col,
  // status
  output logic       tx_busy,
  output logic       tx_done,
  output logic       tx_abort,
  output logic [4:0] tx_attempts
);
  localparam int unsigned IFG_NIB  = 24;   // 96 bit times
  localparam int unsigned SLOT_NIB = 128;  // 512 bit times
  localparam int unsigned JAM_NIB  = 8;    // 32 bit times
  localparam int unsigned MIN_LEN  = 60;   // bytes before the FCS

  typedef enum logic [2:0] {
    T_LOAD, T_DEFER, T_SEND, T_JAM, T_BACKOFF, T_GAP
  } tstate_e;

  tstate_e             state;
  logic [7:0]          buf_mem [1 << BUF_AW];
  logic [BUF_AW:0]     len;          // bytes loaded
  logic [BUF_AW+1:0]   pos;          // byte position on the wire
  logic                nib;          // 0: low nibble, 1: high nibble
  logic [31:0]         crc;
  logic [15:0]         lfsr;
  logic [19:0]         wait_cnt;
  logic [BUF_AW+1:0]   body_len, fcs_pos, end_pos;
  logic [7:0]          cur_byte;

  assign body_len = (len < (BUF_AW+1)'(MIN_LEN)) ? (BUF_AW+2)'(MIN_LEN) : (BUF_AW+2)'(len);
  assign fcs_pos  = body_len + 8;
  assign end_pos  = body_len + 12;

  // byte on the wire at position pos
  always_comb begin
    if (pos < 7)                cur_byte = 8'h55;
    else if (pos == 7)          cur_byte = 8'hD5;
    else if (pos < fcs_pos) begin
      if (pos - 8 < (BUF_AW+2)'(len)) cur_byte = buf_mem[BUF_AW'(pos - 8)];
      else                            cur_byte = 8'h00;
    end else begin
      case (2'(pos - fcs_pos))
        2'd0:    cur_byte = ~crc[7:0];
        2'd1:    cur_byte = ~crc[15:8];
        2'd2:    cur_byte = ~crc[23:16];
        default: cur_byte = ~crc[31:24];
      endcase
    end
  end

  logic crs_eff, col_eff;
  assign crs_eff = mii_crs && !full_duplex;
  assign col_eff = mii_col && !full_duplex;

  assign s_ready = (state == T_LOAD);
  assign tx_busy = (state != T_LOAD);

  // backoff window mask after n collisions: 2^min(n,10)-1
  function automatic logic [9:0] bo_mask(input logic [4:0] n);
    logic [9:0] m;
    m = '0;
    for (int i = 0; i < 10; i++) if (i < int'(n)) m[i] = 1'b1;
    return m;
  endfunction

  always_ff @(posedge clk) begin
    if (state == T_LOAD && s_valid && len < (BUF_AW+1)'(1 << BUF_AW))
      buf_mem[len[BUF_AW-1:0]] <= s_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= T_LOAD;
      len         <= '0;
      pos         <= '0;
      nib         <= 1'b0;
      crc         <= '1;
      lfsr        <= 16'hACE1;
      wait_cnt    <= '0;
      mii_txd     <= '0;
      mii_tx_en   <= 1'b0;
      tx_done     <= 1'b0;
      tx_abort    <= 1'b0;
      tx_attempts <= '0;
    end else begin
      tx_done  <= 1'b0;
      tx_abort <= 1'b0;
      lfsr     <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      case (state)
        T_LOAD: begin
          if (s_valid) begin
            if (len < (BUF_AW+1)'(1 << BUF_AW)) len <= len + 1'b1;
            if (s_last) begin
              state       <= T_DEFER;
              wait_cnt    <= '0;
              tx_attempts <= '0;
            end
          end
        end
        T_DEFER: if (tx_ce) begin
          // medium must be quiet for a whole inter-frame gap
          if (crs_eff) wait_cnt <= '0;
          else if (wait_cnt < 20'(IFG_NIB)) wait_cnt <= wait_cnt + 1'b1;
          else begin
            state     <= T_SEND;
            pos       <= '0;
            crc       <= '1;
            mii_tx_en <= 1'b1;
            mii_txd   <= 4'h5;         // first preamble nibble
            nib       <= 1'b1;
            tx_attempts <= tx_attempts + 1'b1;
          end
        end
        T_SEND: if (tx_ce) begin
          if (col_eff) begin
            state    <= T_JAM;
            wait_cnt <= 20'(JAM_NIB - 1);
            mii_txd  <= 4'h5;
          end else if (nib) begin
            mii_txd <= cur_byte[7:4];
            nib     <= 1'b0;
            if (pos >= 8 && pos < fcs_pos) crc <= crc32_byte(crc, cur_byte);
            pos     <= pos + 1'b1;
          end else if (pos == end_pos) begin
            mii_tx_en <= 1'b0;
            mii_txd   <= '0;
            tx_done   <= 1'b1;
            state     <= T_GAP;
            wait_cnt  <= '0;
          end else begin
            mii_txd <= cur_byte[3:0];
            nib     <= 1'b1;
          end
        end
        T_JAM: if (tx_ce) begin
          if (wait_cnt != 0) begin
            wait_cnt <= wait_cnt - 1'b1;
            mii_txd  <= 4'h5;
          end else begin
            mii_tx_en <= 1'b0;
            mii_txd   <= '0;
            if (tx_attempts >= 5'd16) begin
              tx_abort <= 1'b1;
              state    <= T_GAP;
              wait_cnt <= '0;
            end else begin
              state    <= T_BACKOFF;
              wait_cnt <= 20'(lfsr[9:0] & bo_mask(tx_attempts)) * 20'(SLOT_NIB);
            end
          end
        end
        T_BACKOFF: if (tx_ce) begin
          if (wait_cnt != 0) wait_cnt <= wait_cnt - 1'b1;
          else begin
            state    <= T_DEFER;
            wait_cnt <= '0;
          end
        end
        T_GAP: if (tx_ce) begin
          if (wait_cnt < 20'(IFG_NIB)) wait_cnt <= wait_cnt + 1'b1;
          else begin
            state <= T_LOAD;
            len   <= '0;
          end
        end
        default: state <= T_LOAD;
      endcase
    end
  end

  // the transmitter never drives the medium outside a send or a jam
  a_tx_en_state: assert property (@(posedge clk)
                                  mii_tx_en |-> (state == T_SEND || state == T_JAM));
endmodule
