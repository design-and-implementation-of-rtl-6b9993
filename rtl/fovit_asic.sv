// fovit_asic: top level of the FOVIT opto-electronic transceiver ASIC.
//
// The ASIC joins two FOVIT units over one optical fibre per direction. In the
// transmit direction it multiplexes a 2.048 Mbit/s video stream (from an E1
// line interface), a 64 kbit/s A-law voice channel (from a PCM CODEC) and a
// 128 kbit/s microcontroller protocol channel into 288-bit frames, each with
// an alignment word and a CRC-4, sent to the laser driver at 2.304 Mbit/s. In
// the receive direction it aligns to the frames from the clock recovery
// circuit, checks them and hands video, voice and protocol data back out.
// A CS-strobed register bank connects it to the board microcontroller, which
// also uses the ASIC's 16 general purpose I/O pins.
//
// Clocks (all inputs; the two analog PLLs and the clock recovery are outside):
//   tx_clk2  2.048 MHz from the video module (TX_CLK2)
//   tx_iclk  2.304 MHz laser transmit clock from the transmit PLL (TX_ICLK)
//   rx_iclk  2.304 MHz recovered line clock (RX_ICLK)
//   rx_clk2  2.048 MHz from the receive PLL (RX_CLK2)
// The PLL dividers inside the ASIC give the 16 kHz phase-detector inputs:
//   clk_1 = tx_clk2 / 128 (reference),  clk_2 = tx_iclk / 144 (feedback),
//   clk_3 = rx_clk2 / 128 (feedback),   clk_4 = rx_iclk / 144 (reference),
// so each PLL holds its 2.304 / 2.048 MHz pair at the ratio 9/8.
//
// Reset: reset_n (asynchronous, active low) resets everything. The command
// register's reset bit resets the transmitter and receiver but not the
// register bank or the PLL dividers, so the PLLs stay locked.
// The bidirectional DATA and IODATA pins are split into input, output and
// output-enable signals; irq_n is the level of the open-drain IRQ pin.
// The partitioning and the pins follow the source; which 2.048 MHz clock is
// an input and the split of bidirectional pins are this design's choices.
module fovit_asic
  import fovit_pkg::*;
#(
  parameter int unsigned VID_FIFO_DEPTH = 128,
  parameter int unsigned AUD_FIFO_DEPTH = 32,
  parameter logic [15:0] CRC_THRESHOLD  = 16'd16
) (
  input  logic        reset_n,
  // microcontroller interface
  input  logic        cs_n,
  input  logic        rw,
  input  logic [3:0]  addr,
  input  logic [7:0]  data_i,
  output logic [7:0]  data_o,
  output logic        data_oe,
  output logic        irq_n,
  // general purpose I/O
  input  logic [15:0] io_i,
  output logic [15:0] io_o,
  output logic [15:0] io_oe,
  // transmit PCM side: video module and voice CODEC
  input  logic        tx_clk2,
  input  logic        vid_tx_data,
  input  logic        aud_tx_data,
  output logic        fsx,
  // transmit line side
  input  logic        tx_iclk,
  output logic        las_tdata,
  // receive line side
  input  logic        rx_iclk,
  input  logic        las_rdata,
  // receive PCM side
  input  logic        rx_clk2,
  output logic        vid_rx_data,
  output logic        aud_rx_data,
  output logic        fsr,
  // PLL phase-detector clocks, 16 kHz
  output logic        clk_1,
  output logic        clk_2,
  output logic        clk_3,
  output logic        clk_4
);

  logic                  soft_reset, core_arst_n;
  logic [15:0]           cycle_len, crc_err_count;
  logic [PROTO_BITS-1:0] tx_proto_word, rx_proto_word;
  logic                  tx_proto_tgl, clr_tgl, clr_ack;
  irq_vec_t              clr_mask, irq_flags;
  logic                  in_sync, crc_over_thr, tx_slip, rx_slip, tx_ovf, rx_ovf;
  logic                  tx_frame_start, tx_vid_run, tx_aud_run;

  assign core_arst_n = reset_n & ~soft_reset;

  mcu_interface u_mcu (
    .rst_n         (reset_n),
    .cs_n          (cs_n),
    .rw            (rw),
    .addr          (addr),
    .data_i        (data_i),
    .data_o        (data_o),
    .data_oe       (data_oe),
    .irq_n         (irq_n),
    .io_i          (io_i),
    .io_o          (io_o),
    .io_oe         (io_oe),
    .soft_reset    (soft_reset),
    .cycle_len     (cycle_len),
    .tx_proto_word (tx_proto_word),
    .tx_proto_tgl  (tx_proto_tgl),
    .clr_mask      (clr_mask),
    .clr_tgl       (clr_tgl),
    .irq_flags     (irq_flags),
    .clr_ack       (clr_ack),
    .crc_err_count (crc_err_count),
    .rx_proto_word (rx_proto_word),
    .in_sync       (in_sync),
    .crc_over_thr  (crc_over_thr),
    .tx_slip       (tx_slip),
    .rx_slip       (rx_slip),
    .fifo_overflow (tx_ovf | rx_ovf)
  );

  fovit_transmitter #(
    .VID_FIFO_DEPTH (VID_FIFO_DEPTH),
    .AUD_FIFO_DEPTH (AUD_FIFO_DEPTH)
  ) u_tx (
    .arst_n      (core_arst_n),
    .tx_clk2     (tx_clk2),
    .vid_tx_data (vid_tx_data),
    .aud_tx_data (aud_tx_data),
    .fsx         (fsx),
    .tx_iclk     (tx_iclk),
    .las_tdata   (las_tdata),
    .frame_start (tx_frame_start),
    .proto_word  (tx_proto_word),
    .proto_tgl   (tx_proto_tgl),
    .tx_slip     (tx_slip),
    .tx_overflow (tx_ovf),
    .vid_run     (tx_vid_run),
    .aud_run     (tx_aud_run)
  );

  fovit_receiver #(
    .VID_FIFO_DEPTH (VID_FIFO_DEPTH),
    .AUD_FIFO_DEPTH (AUD_FIFO_DEPTH),
    .CRC_THRESHOLD  (CRC_THRESHOLD)
  ) u_rx (
    .arst_n        (core_arst_n),
    .rx_iclk       (rx_iclk),
    .las_rdata     (las_rdata),
    .rx_clk2       (rx_clk2),
    .vid_rx_data   (vid_rx_data),
    .aud_rx_data   (aud_rx_data),
    .fsr           (fsr),
    .cycle_len     (cycle_len),
    .clr_mask      (clr_mask),
    .clr_tgl       (clr_tgl),
    .irq_flags     (irq_flags),
    .clr_ack       (clr_ack),
    .crc_err_count (crc_err_count),
    .proto_rx_word (rx_proto_word),
    .in_sync       (in_sync),
    .crc_over_thr  (crc_over_thr),
    .rx_slip       (rx_slip),
    .rx_overflow   (rx_ovf)
  );

  // ---------------- PLL dividers ----------------
  logic rst_tx2_n, rst_txi_n, rst_rx2_n, rst_rxi_n;

  reset_sync u_rs_tx2 (.clk(tx_clk2), .arst_n(reset_n), .rst_n(rst_tx2_n));
  reset_sync u_rs_txi (.clk(tx_iclk), .arst_n(reset_n), .rst_n(rst_txi_n));
  reset_sync u_rs_rx2 (.clk(rx_clk2), .arst_n(reset_n), .rst_n(rst_rx2_n));
  reset_sync u_rs_rxi (.clk(rx_iclk), .arst_n(reset_n), .rst_n(rst_rxi_n));

  clk_divider #(.DIV(128)) u_div_clk1 (.clk(tx_clk2), .rst_n(rst_tx2_n), .clk_div(clk_1));
  clk_divider #(.DIV(144)) u_div_clk2 (.clk(tx_iclk), .rst_n(rst_txi_n), .clk_div(clk_2));
  clk_divider #(.DIV(128)) u_div_clk3 (.clk(rx_clk2), .rst_n(rst_rx2_n), .clk_div(clk_3));
  clk_divider #(.DIV(144)) u_div_clk4 (.clk(rx_iclk), .rst_n(rst_rxi_n), .clk_div(clk_4));

  // Transmit framer status used only inside the transmitter.
  logic unused;
  assign unused = ^{tx_frame_start, tx_vid_run, tx_aud_run};

endmodule
