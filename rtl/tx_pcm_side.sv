// tx_pcm_side: transmit PCM-side control of the FOVIT ASIC, clocked by the
// 2.048 MHz TX_CLK2 of the video module.
//
// The transmission PCM frame counter counts 256 clocks per 125 us frame and
// drives the frame sync pulse FSX to the voice CODEC: FSX is high for the
// clock period in which the counter is 0. The CODEC then shifts its 8-bit
// A-law sample out on AUD_TX_DATA in the next 8 periods (counter 1..8); each
// of those bits is sampled on the rising clock edge and written into the
// audio FIFO. Every clock period one video bit from VID_TX_DATA is written
// into the video FIFO. The 256-clock frame, FSX and the 8-bit burst at
// 2.048 Mbit/s follow the source; the position of the burst relative to FSX
// (one period later, as in the CODEC's short-frame mode) and the sampling edge
// are this design's choices.
module tx_pcm_side
  import fovit_pkg::*;
(
  input  logic clk,            // TX_CLK2, 2.048 MHz
  input  logic rst_n,          // synchronous to clk, active low
  input  logic vid_tx_data,
  input  logic aud_tx_data,
  output logic fsx,
  // video FIFO write port
  output logic vid_wr_en,
  output logic vid_wr_data,
  // audio FIFO write port
  output logic aud_wr_en,
  output logic aud_wr_data
);

  logic [7:0] pcm_cnt;   // transmission PCM frame counter, 0..255

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcm_cnt <= '0;
      fsx     <= 1'b0;
    end else begin
      pcm_cnt <= pcm_cnt + 1'b1;               // wraps at 256
      fsx     <= (pcm_cnt == 8'(PCM_FRAME_CLKS - 1));
    end
  end

  assign vid_wr_en   = 1'b1;
  assign vid_wr_data = vid_tx_data;
  assign aud_wr_en   = (pcm_cnt >= 8'd1) && (pcm_cnt <= 8'(AUDIO_BITS));
  assign aud_wr_data = aud_tx_data;

endmodule
