// eth_mac_rx: Ethernet receiver of the board's MAC.
//
// Watches MII receive nibbles on rx_ce cycles. While rx_dv is high it skips
// the preamble up to the start-frame delimiter (nibble 0xD after 0x5),
// then assembles bytes, least significant nibble first, and runs the
// CRC-32 over everything up to and including the FCS. Bytes leave through a
// four-byte delay line so the FCS itself is never passed on: m_valid/m_data
// carry the frame from destination address to the end of the payload. When
// rx_dv falls, m_eof pulses with m_good set if the CRC residue is right, no
// rx_er was seen, the frame held a whole number of bytes and at least 64 of
// them (FCS included). There is no backpressure: MII cannot be stalled, so
// the consumer must take a byte whenever m_valid is high (at most one per
// two nibble times).
//
// No address filtering is done here: the MCU inspects the header. The
// document asks for the 32-bit CRC; the delay line and the status pulse are
// this design's choices.
module eth_mac_rx
  import testbed_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_ce,
  input  logic [3:0] mii_rxd,
  input  logic       mii_rx_dv,
  input  logic       mii_rx_er,
  output logic [7:0] m_data,
  output logic       m_valid,
  output logic       m_eof,
  output logic       m_good
);
  localparam logic [31:0] CRC_RESIDUE = 32'hDEBB_20E3;

  typedef enum logic [1:0] { R_IDLE, R_PRE, R_DATA, R_DROP } rstate_e;

  rstate_e     state;
  logic [3:0]  lo_nib;
  logic        nib;
  logic [31:0] crc;
  logic [31:0] dly;        // last four bytes, newest in [7:0]
  logic [2:0]  dly_n;      // bytes held in dly
  logic [15:0] nbytes;
  logic        err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= R_IDLE;
      lo_nib  <= '0;
      nib     <= 1'b0;
      crc     <= '1;
      dly     <= '0;
      dly_n   <= '0;
      nbytes  <= '0;
      err     <= 1'b0;
      m_data  <= '0;
      m_valid <= 1'b0;
      m_eof   <= 1'b0;
      m_good  <= 1'b0;
    end else begin
      m_valid <= 1'b0;
      m_eof   <= 1'b0;
      if (rx_ce) begin
        case (state)
          R_IDLE: if (mii_rx_dv) begin
            state <= (mii_rxd == 4'hD) ? R_DATA : R_PRE;
            crc   <= '1;
            dly_n <= '0;
            nbytes <= '0;
            nib   <= 1'b0;
            err   <= mii_rx_er;
          end
          R_PRE: begin
            if (!mii_rx_dv) state <= R_IDLE;
            else if (mii_rxd == 4'hD) state <= R_DATA;
            else if (mii_rxd != 4'h5) state <= R_DROP;
            if (mii_rx_er) err <= 1'b1;
          end
          R_DATA: begin
            if (!mii_rx_dv) begin
              m_eof  <= 1'b1;
              m_good <= !err && !nib && (crc == CRC_RESIDUE) && (nbytes >= 16'd64);
              state  <= R_IDLE;
            end else begin
              if (mii_rx_er) err <= 1'b1;
              if (!nib) begin
                lo_nib <= mii_rxd;
                nib    <= 1'b1;
              end else begin
                nib    <= 1'b0;
                crc    <= crc32_byte(crc, {mii_rxd, lo_nib});
                dly    <= {dly[23:0], mii_rxd, lo_nib};
                if (nbytes != 16'hFFFF) nbytes <= nbytes + 1'b1;
                if (dly_n == 3'd4) begin
                  m_data  <= dly[31:24];
                  m_valid <= 1'b1;
                end else begin
                  dly_n <= dly_n + 1'b1;
                end
              end
            end
          end
          R_DROP: if (!mii_rx_dv) state <= R_IDLE;
          default: state <= R_IDLE;
        endcase
      end
    end
  end
endmodule
