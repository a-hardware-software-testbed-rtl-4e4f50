// spi_master: serial port through which the MCU configures the RF front-end
// (carrier frequency, transmit power and the like).
//
// Mode 0 (SCLK idles low, data sampled on the rising edge, changed on the
// falling edge), most significant bit first, 8 bits per transfer. Chip
// select is a register bit, so the MCU can hold it low across the several
// bytes that RF synthesiser and gain registers usually take.
//
// Registers (byte addresses within the block, selected by bus_sel):
//   0 DATA   W starts a transfer of the byte; R last byte received on MISO
//   1 CTRL   RW [0] chip select active (CS_N low); R [7] BUSY
//   2 DIV    RW half SCLK period in system clocks, minus one (reset 3)
// A transfer takes 17 * (DIV + 1) system clocks (16 SCLK half periods and
// one more before BUSY falls, which holds MOSI after the last edge). The document says only that
// the front-end is configured over SPI or I2C; mode, width and register map
// are this design's choices.
module spi_master (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bus_sel,
  input  logic [1:0] bus_addr,
  input  logic [7:0] bus_wdata,
  input  logic       bus_we,
  output logic [7:0] bus_rdata,
  output logic       spi_sclk,
  output logic       spi_mosi,
  input  logic       spi_miso,
  output logic       spi_cs_n,
  output logic       busy
);
  logic [7:0] div, cnt, tx_sr, rx_sr, rx_byte;
  logic [4:0] edges;    // half periods left in the transfer
  logic       cs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= 8'd3; cnt <= '0; tx_sr <= '0; rx_sr <= '0; rx_byte <= '0;
      edges <= '0; cs <= 1'b0; busy <= 1'b0; spi_sclk <= 1'b0;
    end else begin
      if (bus_sel && bus_we && bus_addr == 2'd1) cs  <= bus_wdata[0];
      if (bus_sel && bus_we && bus_addr == 2'd2) div <= bus_wdata;
      if (!busy) begin
        if (bus_sel && bus_we && bus_addr == 2'd0) begin
          tx_sr <= bus_wdata;
          busy  <= 1'b1;
          edges <= 5'd16;
          cnt   <= div;
        end
      end else if (cnt != 0) begin
        cnt <= cnt - 1'b1;
      end else begin
        cnt <= div;
        if (edges == 0) begin
          busy    <= 1'b0;
          rx_byte <= rx_sr;
        end else begin
          edges    <= edges - 1'b1;
          spi_sclk <= ~spi_sclk;
          if (!spi_sclk) rx_sr <= {rx_sr[6:0], spi_miso};      // rising edge: sample
          else           tx_sr <= {tx_sr[6:0], 1'b0};          // falling edge: shift
        end
      end
    end
  end

  assign spi_mosi = tx_sr[7];
  assign spi_cs_n = ~cs;

  always_comb begin
    case (bus_addr)
      2'd0:    bus_rdata = rx_byte;
      2'd1:    bus_rdata = {busy, 6'd0, cs};
      2'd2:    bus_rdata = div;
      default: bus_rdata = '0;
    endcase
  end
endmodule
