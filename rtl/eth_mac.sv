// eth_mac: Ethernet media access controller of the baseband processing board,
// attached to the external PHY through MII.
//
// The MAC runs on the system (MCU/DMA) clock. The MII clocks, carrier sense
// and collision come from the PHY and are brought in through two-flop
// synchronisers; a falling edge of the synchronised TX_CLK gives the
// transmitter its nibble step (TXD then changes half a period before the
// PHY samples it on the rising edge) and a falling edge of RX_CLK samples
// RXD and RX_DV in the middle of their valid window. This needs a system
// clock at least about four times the MII clock, which holds for the 16 MHz
// MCU clock and the 2.5 MHz MII clock of 10 Mb/s Ethernet; that link speed is
// this design's choice, the document names only MII, CSMA/CD and the CRC.
//
// Transmit and receive are independent (eth_mac_tx, eth_mac_rx); see those
// files for the frame format, CSMA/CD and the CRC check.
module eth_mac #(
  parameter int unsigned BUF_AW = 11
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       full_duplex,
  // transmit frame stream
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  input  logic       tx_last,
  output logic       tx_ready,
  output logic       tx_busy,
  output logic       tx_done,
  output logic       tx_abort,
  output logic [4:0] tx_attempts,
  // receive frame stream
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       rx_eof,
  output logic       rx_good,
  // MII
  input  logic       mii_tx_clk,
  output logic [3:0] mii_txd,
  output logic       mii_tx_en,
  input  logic       mii_rx_clk,
  input  logic [3:0] mii_rxd,
  input  logic       mii_rx_dv,
  input  logic       mii_rx_er,
  input  logic       mii_crs,
  input  logic       mii_col
);
  // synchronisers: {tx_clk, rx_clk, crs, col, rx_dv, rx_er, rxd}
  localparam int unsigned SW = 10;
  logic [SW-1:0] s1, s2;
  logic          tx_clk_d, rx_clk_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; tx_clk_d <= 1'b0; rx_clk_d <= 1'b0;
    end else begin
      s1 <= {mii_tx_clk, mii_rx_clk, mii_crs, mii_col, mii_rx_dv, mii_rx_er, mii_rxd};
      s2 <= s1;
      tx_clk_d <= s2[9];
      rx_clk_d <= s2[8];
    end
  end

  logic tx_ce, rx_ce;
  assign tx_ce = tx_clk_d && !s2[9];
  assign rx_ce = rx_clk_d && !s2[8];

  eth_mac_tx #(.BUF_AW(BUF_AW)) u_tx (
    .clk, .rst_n, .tx_ce, .full_duplex,
    .s_data(tx_data), .s_valid(tx_valid), .s_last(tx_last), .s_ready(tx_ready),
    .mii_txd, .mii_tx_en, .mii_crs(s2[7]), .mii_col(s2[6]),
    .tx_busy, .tx_done, .tx_abort, .tx_attempts);

  eth_mac_rx u_rx (
    .clk, .rst_n, .rx_ce,
    .mii_rxd(s2[3:0]), .mii_rx_dv(s2[5]), .mii_rx_er(s2[4]),
    .m_data(rx_data), .m_valid(rx_valid), .m_eof(rx_eof), .m_good(rx_good));
endmodule
