// playout_ctrl: transmit-side sample player, in the baseband (converter)
// clock domain.
//
// The host sends a frame of baseband samples over several UDP packets; they
// collect in the Tx FIFO, far slower than the converter consumes them. When
// the MCU has the whole frame in the FIFO it raises a play request toggle;
// this block synchronises it and then reads play_len samples, one per
// clock, to the DA converter (dac_valid marks them; between frames the DAC
// gets zero). An empty FIFO during playback gives a zero sample and counts an
// underrun. The converter takes the 12 least significant bits of each half
// of the word. A done toggle goes back to the MCU side. The request/playback
// scheme is this design's choice; the document describes the transfer of
// baseband data from host to board (its Fig. 3(a)) only.
module playout_ctrl
  import testbed_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_tog,
  input  logic [15:0]       play_len,
  output logic              done_tog,
  output logic              busy,
  output logic              fifo_rd_en,
  input  logic [WORD_W-1:0] fifo_rd_data,
  input  logic              fifo_empty,
  output logic [ADC_W-1:0]  dac_i,
  output logic [ADC_W-1:0]  dac_q,
  output logic              dac_valid,
  output logic [15:0]       underruns
);
  logic [2:0]  req_sync;
  logic [15:0] left;

  assign fifo_rd_en = busy && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_sync  <= '0;
      left      <= '0;
      busy      <= 1'b0;
      done_tog  <= 1'b0;
      dac_i     <= '0;
      dac_q     <= '0;
      dac_valid <= 1'b0;
      underruns <= '0;
    end else begin
      req_sync  <= {req_sync[1:0], req_tog};
      dac_valid <= 1'b0;
      dac_i     <= '0;
      dac_q     <= '0;
      if (!busy) begin
        if (req_sync[2] != req_sync[1]) begin
          if (play_len != 0) begin
            busy      <= 1'b1;
            left      <= play_len;
            underruns <= '0;
          end else begin
            done_tog <= ~done_tog;
          end
        end
      end else begin
        dac_valid <= 1'b1;
        if (!fifo_empty) begin
          dac_i <= fifo_rd_data[SAMPLE_W +: ADC_W];
          dac_q <= fifo_rd_data[0 +: ADC_W];
        end else if (underruns != 16'hFFFF) begin
          underruns <= underruns + 1'b1;
        end
        left <= left - 1'b1;
        if (left == 16'd1) begin
          busy     <= 1'b0;
          done_tog <= ~done_tog;
        end
      end
    end
  end
endmodule
