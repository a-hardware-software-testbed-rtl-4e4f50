// capture_ctrl: sampling controller of the receive path, in the baseband
// clock domain.
//
// When the MCU, answering a sample request from the host, asks for sampling,
// a request toggle arrives from the system clock domain. This block
// synchronises it, then writes the next cap_len samples offered on
// s_valid/s_data (converter samples, FFT or equaliser output, chosen in the top)
// into the Rx FIFO, and returns a done toggle. A sample that meets a full
// FIFO is lost and counted in dropped. cap_len is read when the request
// arrives; it is held constant by the MCU while sampling runs, so it needs
// no synchroniser. fifo_wr_data is s_data itself, unregistered: the block
// only decides which words are written (fifo_wr_en), one per clock with no
// added latency. Toggle handshake and drop counter are this design's
// choices; the document describes the sampling step only.
module capture_ctrl
  import testbed_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_tog,
  input  logic [15:0]       cap_len,
  output logic              done_tog,
  output logic              busy,
  input  logic              s_valid,
  input  logic [WORD_W-1:0] s_data,
  output logic              fifo_wr_en,
  output logic [WORD_W-1:0] fifo_wr_data,
  input  logic              fifo_full,
  output logic [15:0]       dropped
);
  logic [2:0]  req_sync;
  logic [15:0] left;

  assign fifo_wr_en   = busy && s_valid && !fifo_full;
  assign fifo_wr_data = s_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_sync <= '0;
      left     <= '0;
      busy     <= 1'b0;
      done_tog <= 1'b0;
      dropped  <= '0;
    end else begin
      req_sync <= {req_sync[1:0], req_tog};
      if (!busy) begin
        if (req_sync[2] != req_sync[1]) begin
          if (cap_len != 0) begin
            busy    <= 1'b1;
            left    <= cap_len;
            dropped <= '0;
          end else begin
            done_tog <= ~done_tog;
          end
        end
      end else if (s_valid) begin
        if (fifo_full && dropped != 16'hFFFF) dropped <= dropped + 1'b1;
        left <= left - 1'b1;
        if (left == 16'd1) begin
          busy     <= 1'b0;
          done_tog <= ~done_tog;
        end
      end
    end
  end
endmodule
