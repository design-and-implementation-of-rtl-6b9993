// fovit_receiver: receive half of the FOVIT ASIC.
//
// Takes the 2.304 Mbit/s line stream from the clock recovery circuit, finds
// the 288-bit frames by their alignment word, checks each frame's CRC-4,
// extracts the 16-bit protocol word for the microcontroller, and passes the
// 256 video bits and 8 audio bits of each frame through rate-adaptation FIFOs
// to the 2.048 Mbit/s PCM side (VID_RX_DATA, AUD_RX_DATA with FSR).
//
// Two clock domains:
//   rx_iclk (2.304 MHz, RX_ICLK): frame alignment, demultiplexer, CRC checker
//            (rx_line_deframer), CRC error counter (crc_err_monitor),
//            interrupt flags (irq_ctrl), FIFO writes.
//   rx_clk2 (2.048 MHz, RX_CLK2): PCM frame counter, FSR, FIFO reads
//            (rx_pcm_side).
// RX_CLK2 must be phase-locked to 8/9 of RX_ICLK by the external receive
// PLL. The microcontroller-side inputs cycle_len and clr_mask are
// quasi-static: they are written well before they are used (cycle_len) or
// held stable while their toggle crosses (clr_mask). arst_n resets both
// domains. The structure follows the source; FIFO depths, the crossing
// scheme and the reset bridges are this design's choices.
module fovit_receiver
  import fovit_pkg::*;
#(
  parameter int unsigned VID_FIFO_DEPTH = 128,
  parameter int unsigned AUD_FIFO_DEPTH = 32,
  parameter logic [15:0] CRC_THRESHOLD  = 16'd16
) (
  input  logic                  arst_n,
  // line side
  input  logic                  rx_iclk,
  input  logic                  las_rdata,
  // PCM side
  input  logic                  rx_clk2,
  output logic                  vid_rx_data,
  output logic                  aud_rx_data,
  output logic                  fsr,
  // to / from the microcontroller interface
  input  logic [15:0]           cycle_len,
  input  irq_vec_t              clr_mask,
  input  logic                  clr_tgl,
  output irq_vec_t              irq_flags,
  output logic                  clr_ack,
  output logic [15:0]           crc_err_count,
  output logic [PROTO_BITS-1:0] proto_rx_word,
  // status
  output logic                  in_sync,
  output logic                  crc_over_thr,
  output logic                  rx_slip,
  output logic                  rx_overflow
);

  localparam int unsigned VLW = $clog2(VID_FIFO_DEPTH) + 1;
  localparam int unsigned ALW = $clog2(AUD_FIFO_DEPTH) + 1;

  logic line_rst_n, pcm_rst_n;

  reset_sync u_rs_line (.clk(rx_iclk), .arst_n(arst_n), .rst_n(line_rst_n));
  reset_sync u_rs_pcm  (.clk(rx_clk2), .arst_n(arst_n), .rst_n(pcm_rst_n));

  // ---------------- line side ----------------
  logic vid_wr_en, vid_wr_data, aud_wr_en, aud_wr_data;
  logic frame_end, crc_err, sync_event, lfa_event, proto_new, thr_event;

  rx_line_deframer u_deframer (
    .clk         (rx_iclk),
    .rst_n       (line_rst_n),
    .las_rdata   (las_rdata),
    .vid_wr_en   (vid_wr_en),
    .vid_wr_data (vid_wr_data),
    .aud_wr_en   (aud_wr_en),
    .aud_wr_data (aud_wr_data),
    .in_sync     (in_sync),
    .frame_end   (frame_end),
    .crc_err     (crc_err),
    .sync_event  (sync_event),
    .lfa_event   (lfa_event),
    .proto_word  (proto_rx_word),
    .proto_new   (proto_new)
  );

  crc_err_monitor #(.THRESHOLD(CRC_THRESHOLD)) u_crc_mon (
    .clk       (rx_iclk),
    .rst_n     (line_rst_n),
    .frame_end (frame_end),
    .crc_err   (crc_err),
    .cycle_len (cycle_len),
    .err_count (crc_err_count),
    .over_thr  (crc_over_thr),
    .thr_event (thr_event)
  );

  irq_vec_t events;
  assign events = '{sync: sync_event, proto_rx: proto_new, crc_thr: thr_event, lfa: lfa_event};

  irq_ctrl u_irq (
    .clk      (rx_iclk),
    .rst_n    (line_rst_n),
    .events   (events),
    .clr_mask (clr_mask),
    .clr_tgl  (clr_tgl),
    .flags    (irq_flags),
    .clr_ack  (clr_ack)
  );

  // ---------------- rate adaptation FIFOs ----------------
  logic vid_full, aud_full, vid_ovf, aud_ovf, vid_unf, aud_unf;
  logic vid_rd_en, vid_rd_data, vid_empty, aud_rd_en, aud_rd_data, aud_empty;
  logic [VLW-1:0] vid_wr_level, vid_rd_level;
  logic [ALW-1:0] aud_wr_level, aud_rd_level;

  async_fifo #(.WIDTH(1), .DEPTH(VID_FIFO_DEPTH)) u_vid_fifo (
    .wr_clk (rx_iclk), .wr_rst_n (line_rst_n), .wr_en (vid_wr_en), .wr_data (vid_wr_data),
    .full (vid_full), .wr_level (vid_wr_level), .wr_overflow (vid_ovf),
    .rd_clk (rx_clk2), .rd_rst_n (pcm_rst_n), .rd_en (vid_rd_en), .rd_data (vid_rd_data),
    .empty (vid_empty), .rd_level (vid_rd_level), .rd_underflow (vid_unf)
  );

  async_fifo #(.WIDTH(1), .DEPTH(AUD_FIFO_DEPTH)) u_aud_fifo (
    .wr_clk (rx_iclk), .wr_rst_n (line_rst_n), .wr_en (aud_wr_en), .wr_data (aud_wr_data),
    .full (aud_full), .wr_level (aud_wr_level), .wr_overflow (aud_ovf),
    .rd_clk (rx_clk2), .rd_rst_n (pcm_rst_n), .rd_en (aud_rd_en), .rd_data (aud_rd_data),
    .empty (aud_empty), .rd_level (aud_rd_level), .rd_underflow (aud_unf)
  );

  assign rx_overflow = vid_ovf | aud_ovf;

  // ---------------- PCM side ----------------
  logic vid_run, aud_run;

  rx_pcm_side #(
    .VID_LW      (VLW),
    .AUD_LW      (ALW),
    .START_VIDEO (VID_FIFO_DEPTH / 2),
    .START_AUDIO (AUD_FIFO_DEPTH / 2)
  ) u_pcm (
    .clk         (rx_clk2),
    .rst_n       (pcm_rst_n),
    .vid_rd_en   (vid_rd_en),
    .vid_rd_data (vid_rd_data),
    .vid_empty   (vid_empty),
    .vid_level   (vid_rd_level),
    .aud_rd_en   (aud_rd_en),
    .aud_rd_data (aud_rd_data),
    .aud_empty   (aud_empty),
    .aud_level   (aud_rd_level),
    .vid_rx_data (vid_rx_data),
    .aud_rx_data (aud_rx_data),
    .fsr         (fsr),
    .vid_run     (vid_run),
    .aud_run     (aud_run),
    .slip        (rx_slip)
  );

  // Flags and levels not needed outside (the sticky underflows duplicate slip).
  logic unused;
  assign unused = ^{vid_full, aud_full, vid_wr_level, aud_wr_level, vid_unf, aud_unf,
                    vid_run, aud_run};

endmodule
