// fovit_pkg: constants and types shared by the FOVIT transceiver ASIC.
//
// Line frame (one every 125 us, 288 bits at 2.304 Mbit/s):
//   bits   0..3    frame alignment word (FAW)
//   bits   4..259  video, 256 bits (2.048 Mbit/s)
//   bits 260..267  audio, 8 bits (one A-law PCM sample, 64 kbit/s)
//   bits 268..283  microcontroller protocol word, 16 bits (128 kbit/s), MSB first
//   bits 284..287  CRC-4 over bits 0..283 of the same frame, MSB first
// The field sizes of video, audio, protocol and CRC, the 288-bit frame and the
// 125 us period follow the source. The frame table there also lists an 8-bit
// FAW, which would make 292 bits; this design keeps the 288-bit frame (that
// the 2.304 Mbit/s line rate is derived from) and uses a 4-bit FAW. The FAW
// pattern, bit order and position of the CRC cover are this design's choices.
package fovit_pkg;

  localparam int unsigned FAW_BITS   = 4;
  localparam int unsigned VIDEO_BITS = 256;
  localparam int unsigned AUDIO_BITS = 8;
  localparam int unsigned PROTO_BITS = 16;
  localparam int unsigned CRC_BITS   = 4;
  localparam int unsigned FRAME_BITS = FAW_BITS + VIDEO_BITS + AUDIO_BITS + PROTO_BITS + CRC_BITS;

  // First bit position of each field in the line frame.
  localparam int unsigned POS_VIDEO = FAW_BITS;
  localparam int unsigned POS_AUDIO = POS_VIDEO + VIDEO_BITS;
  localparam int unsigned POS_PROTO = POS_AUDIO + AUDIO_BITS;
  localparam int unsigned POS_CRC   = POS_PROTO + PROTO_BITS;

  // Frame alignment word, sent first bit = MSB.
  localparam logic [FAW_BITS-1:0] FAW_PATTERN = 4'b1101;

  // CRC-4 generator polynomial x^4 + x + 1 (the CRC-4 of ITU-T G.704);
  // bit i is the coefficient of x^i, x^4 implied.
  localparam logic [3:0] CRC4_POLY = 4'b0011;

  // PCM side: one 125 us PCM frame is 256 periods of the 2.048 MHz clock.
  localparam int unsigned PCM_FRAME_CLKS = 256;

  // Microcontroller register addresses (4-bit address bus).
  typedef enum logic [3:0] {
    REG_STATUS_CMD   = 4'h0,  // read: status,           write: command
    REG_INT          = 4'h1,  // read: interrupt source, write: interrupt mask
    REG_CRC_LO       = 4'h2,  // read: CRC errors [7:0], write: CRC reset cycle [7:0]
    REG_CRC_HI       = 4'h3,  // read: CRC errors [15:8], write: CRC reset cycle [15:8]
    REG_DDR_A        = 4'h5,  // GPIO direction, IODATA[7:0]  (1 = output)
    REG_DDR_B        = 4'h6,  // GPIO direction, IODATA[15:8] (1 = output)
    REG_IO_A         = 4'h7,  // GPIO data, IODATA[7:0]
    REG_IO_B         = 4'h8,  // GPIO data, IODATA[15:8]
    REG_PROTO_LO     = 4'h9,  // write: transmit protocol [7:0],  read: received [7:0]
    REG_PROTO_HI     = 4'hA   // write: transmit protocol [15:8], read: received [15:8]
  } reg_addr_e;

  // Interrupt sources, one bit each in the interrupt source and mask registers.
  typedef struct packed {
    logic sync;      // bit 3: frame alignment recovered after a loss
    logic proto_rx;  // bit 2: a new protocol word was received
    logic crc_thr;   // bit 1: CRC errors in the current cycle exceeded the threshold
    logic lfa;       // bit 0: loss of frame alignment
  } irq_vec_t;

endpackage
