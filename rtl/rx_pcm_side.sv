// rx_pcm_side: receive PCM-side control of the FOVIT ASIC, clocked by the
// 2.048 MHz RX_CLK2 (the output of the external receive PLL).
//
// The PCM receiver frame counter counts 256 clocks per 125 us frame. FSR is
// high in the clock period in which the counter is 0, and the 8 bits of one
// voice sample are presented on AUD_RX_DATA in the next 8 periods (counter
// 1..8), MSB first, for the CODEC's receive side. VID_RX_DATA carries one
// video bit in every clock period. Both outputs are registered and change on
// the rising clock edge.
//
// FIFO control: video starts to be read once the receive video FIFO holds
// START_VIDEO bits and is then read every clock; audio starts, at a PCM frame
// boundary, once its FIFO holds START_AUDIO bits and is then read 8 bits per
// frame. If a FIFO runs empty that stream stops (all-ones are output and a
// slip is flagged) until its FIFO is centred again. The frame, FSR and rates
// follow the source; start levels, idle value and slip handling are this
// design's choices.
module rx_pcm_side
  import fovit_pkg::*;
#(
  parameter int unsigned VID_LW      = 8,
  parameter int unsigned AUD_LW      = 6,
  parameter int unsigned START_VIDEO = 64,
  parameter int unsigned START_AUDIO = 16
) (
  input  logic              clk,          // RX_CLK2, 2.048 MHz
  input  logic              rst_n,
  // video FIFO read port
  output logic              vid_rd_en,
  input  logic              vid_rd_data,
  input  logic              vid_empty,
  input  logic [VID_LW-1:0] vid_level,
  // audio FIFO read port
  output logic              aud_rd_en,
  input  logic              aud_rd_data,
  input  logic              aud_empty,
  input  logic [AUD_LW-1:0] aud_level,
  // PCM side pins
  output logic              vid_rx_data,
  output logic              aud_rx_data,
  output logic              fsr,
  // status
  output logic              vid_run,
  output logic              aud_run,
  output logic              slip
);

  logic [7:0] pcm_cnt;
  logic       aud_slot;   // the counter is one period ahead of the output

  assign aud_slot  = (pcm_cnt < 8'(AUDIO_BITS));
  assign vid_rd_en = vid_run;
  assign aud_rd_en = aud_run && aud_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcm_cnt     <= '0;
      fsr         <= 1'b0;
      vid_rx_data <= 1'b1;
      aud_rx_data <= 1'b1;
      vid_run     <= 1'b0;
      aud_run     <= 1'b0;
      slip        <= 1'b0;
    end else begin
      pcm_cnt     <= pcm_cnt + 1'b1;
      fsr         <= (pcm_cnt == 8'(PCM_FRAME_CLKS - 1));
      vid_rx_data <= vid_run ? vid_rd_data : 1'b1;
      aud_rx_data <= (aud_run && aud_slot) ? aud_rd_data : 1'b1;

      if (!vid_run) vid_run <= (vid_level >= VID_LW'(START_VIDEO));
      else if (vid_empty) begin vid_run <= 1'b0; slip <= 1'b1; end

      if (pcm_cnt == 8'(PCM_FRAME_CLKS - 1)) aud_run <= aud_run || (aud_level >= AUD_LW'(START_AUDIO));
      else if (aud_rd_en && aud_empty) begin aud_run <= 1'b0; slip <= 1'b1; end
    end
  end

endmodule
