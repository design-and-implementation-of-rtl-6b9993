// fovit_transmitter: transmit half of the FOVIT ASIC.
//
// Multiplexes the 2.048 Mbit/s video stream, the 64 kbit/s PCM voice samples
// and a 16-bit microcontroller protocol word into 288-bit line frames sent at
// 2.304 Mbit/s, with a frame alignment word and a CRC-4 per frame.
//
// Two clock domains:
//   tx_clk2 (2.048 MHz, TX_CLK2): PCM frame counter, FSX, writes into the
//            video and audio FIFOs (tx_pcm_side).
//   tx_iclk (2.304 MHz, TX_ICLK): line frame generator, reads of the FIFOs,
//            CRC, protocol shifter, LAS_TDATA (tx_line_framer).
// TX_ICLK must be phase-locked to 9/8 of TX_CLK2 (the external PLL does
// this); the FIFOs then absorb only the bursty pattern of the line frame.
//
// The protocol word comes from the asynchronous microcontroller interface:
// proto_word is held stable there and proto_tgl toggles after each new word;
// the toggle is synchronised into tx_iclk and the word is copied when the
// toggle is seen to change. arst_n resets both domains (asynchronous
// assertion, synchronous release per domain).
// The structure (PCM side, FIFOs, line framer) follows the source; FIFO
// depths, the crossing scheme and the reset bridges are this design's choices.
module fovit_transmitter
  import fovit_pkg::*;
#(
  parameter int unsigned VID_FIFO_DEPTH = 128,
  parameter int unsigned AUD_FIFO_DEPTH = 32
) (
  input  logic                  arst_n,
  // PCM side
  input  logic                  tx_clk2,
  input  logic                  vid_tx_data,
  input  logic                  aud_tx_data,
  output logic                  fsx,
  // line side
  input  logic                  tx_iclk,
  output logic                  las_tdata,
  output logic                  frame_start,
  // protocol word from the microcontroller interface
  input  logic [PROTO_BITS-1:0] proto_word,
  input  logic                  proto_tgl,
  // status: tx_slip, vid_run, aud_run in the tx_iclk domain; tx_overflow in
  // the tx_clk2 domain (FIFO write side)
  output logic                  tx_slip,
  output logic                  tx_overflow,
  output logic                  vid_run,
  output logic                  aud_run
);

  localparam int unsigned VLW = $clog2(VID_FIFO_DEPTH) + 1;
  localparam int unsigned ALW = $clog2(AUD_FIFO_DEPTH) + 1;

  logic pcm_rst_n, line_rst_n;

  reset_sync u_rs_pcm  (.clk(tx_clk2), .arst_n(arst_n), .rst_n(pcm_rst_n));
  reset_sync u_rs_line (.clk(tx_iclk), .arst_n(arst_n), .rst_n(line_rst_n));

  // ---------------- PCM side ----------------
  logic vid_wr_en, vid_wr_data, aud_wr_en, aud_wr_data;
  logic vid_full, aud_full, vid_ovf, aud_ovf;
  logic [VLW-1:0] vid_wr_level;
  logic [ALW-1:0] aud_wr_level;

  tx_pcm_side u_pcm (
    .clk         (tx_clk2),
    .rst_n       (pcm_rst_n),
    .vid_tx_data (vid_tx_data),
    .aud_tx_data (aud_tx_data),
    .fsx         (fsx),
    .vid_wr_en   (vid_wr_en),
    .vid_wr_data (vid_wr_data),
    .aud_wr_en   (aud_wr_en),
    .aud_wr_data (aud_wr_data)
  );

  // ---------------- rate adaptation FIFOs ----------------
  logic vid_rd_en, vid_rd_data, vid_empty, vid_unf;
  logic aud_rd_en, aud_rd_data, aud_empty, aud_unf;
  logic [VLW-1:0] vid_rd_level;
  logic [ALW-1:0] aud_rd_level;

  async_fifo #(.WIDTH(1), .DEPTH(VID_FIFO_DEPTH)) u_vid_fifo (
    .wr_clk (tx_clk2), .wr_rst_n (pcm_rst_n), .wr_en (vid_wr_en), .wr_data (vid_wr_data),
    .full (vid_full), .wr_level (vid_wr_level), .wr_overflow (vid_ovf),
    .rd_clk (tx_iclk), .rd_rst_n (line_rst_n), .rd_en (vid_rd_en), .rd_data (vid_rd_data),
    .empty (vid_empty), .rd_level (vid_rd_level), .rd_underflow (vid_unf)
  );

  async_fifo #(.WIDTH(1), .DEPTH(AUD_FIFO_DEPTH)) u_aud_fifo (
    .wr_clk (tx_clk2), .wr_rst_n (pcm_rst_n), .wr_en (aud_wr_en), .wr_data (aud_wr_data),
    .full (aud_full), .wr_level (aud_wr_level), .wr_overflow (aud_ovf),
    .rd_clk (tx_iclk), .rd_rst_n (line_rst_n), .rd_en (aud_rd_en), .rd_data (aud_rd_data),
    .empty (aud_empty), .rd_level (aud_rd_level), .rd_underflow (aud_unf)
  );

  assign tx_overflow = vid_ovf | aud_ovf;

  // ---------------- protocol word crossing ----------------
  logic                  tgl_s, tgl_seen;
  logic [PROTO_BITS-1:0] proto_q;

  sync_2ff u_tgl_sync (.clk(tx_iclk), .rst_n(line_rst_n), .d(proto_tgl), .q(tgl_s));

  always_ff @(posedge tx_iclk or negedge line_rst_n) begin
    if (!line_rst_n) begin
      tgl_seen <= 1'b0;
      proto_q  <= '0;
    end else if (tgl_s != tgl_seen) begin
      tgl_seen <= tgl_s;
      proto_q  <= proto_word;   // held stable by the sender since the toggle
    end
  end

  // ---------------- line side ----------------
  tx_line_framer #(
    .VID_LW      (VLW),
    .AUD_LW      (ALW),
    .START_VIDEO (VID_FIFO_DEPTH / 2),
    .START_AUDIO (AUD_FIFO_DEPTH / 2)
  ) u_framer (
    .clk         (tx_iclk),
    .rst_n       (line_rst_n),
    .vid_rd_en   (vid_rd_en),
    .vid_rd_data (vid_rd_data),
    .vid_empty   (vid_empty),
    .vid_level   (vid_rd_level),
    .aud_rd_en   (aud_rd_en),
    .aud_rd_data (aud_rd_data),
    .aud_empty   (aud_empty),
    .aud_level   (aud_rd_level),
    .proto_word  (proto_q),
    .las_tdata   (las_tdata),
    .frame_start (frame_start),
    .vid_run     (vid_run),
    .aud_run     (aud_run),
    .slip        (tx_slip)
  );

  // Levels and flags seen only for status/debug.
  logic unused;
  assign unused = ^{vid_full, aud_full, vid_wr_level, aud_wr_level, vid_unf, aud_unf};

endmodule
