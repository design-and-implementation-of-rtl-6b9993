// tx_line_framer: transmit line frame generator, line time-division
// multiplexer, sync word generator, CRC-4 generator and transmit protocol
// shifter of the FOVIT ASIC, clocked by the 2.304 MHz laser line clock TX_ICLK.
//
// A bit counter runs over the 288 positions of the line frame (see
// fovit_pkg). In each position the multiplexer picks the next line bit: the
// FAW, a bit popped from the video FIFO, a bit popped from the audio FIFO, a
// bit of the protocol shifter, or a bit of the CRC-4 remainder of positions
// 0..283. The chosen bit is registered onto LAS_TDATA, so the line output is
// one clock behind the counter. The protocol word is loaded into the shifter
// in the position just before the protocol slot of every frame, and is
// repeated in every frame until it changes.
//
// FIFO control: while a stream (video or audio) is stopped, as after reset,
// the surplus over START_VIDEO / START_AUDIO bits is discarded from its FIFO,
// one bit per clock, which holds the FIFO half full. The stream starts at a
// frame start (decided in the last position of the previous frame) once its
// FIFO holds the start level; from then on exactly 256 video and 8 audio bits
// are read per frame, matching the 2.048 Mbit/s write rate when TX_ICLK is
// locked to 9/8 of TX_CLK2. If a FIFO runs empty the stream stops (slip is flagged and
// all-ones are sent in its slot) and restarts at a later frame start once
// the FIFO is centred again. The frame layout, rates, CRC-4 and the use of
// FIFOs for rate adaptation follow the source; the start levels, the idle
// value and the slip handling are this design's choices.
module tx_line_framer
  import fovit_pkg::*;
#(
  parameter int unsigned VID_LW      = 8,    // width of the video FIFO level
  parameter int unsigned AUD_LW      = 6,    // width of the audio FIFO level
  parameter int unsigned START_VIDEO = 64,
  parameter int unsigned START_AUDIO = 16
) (
  input  logic              clk,             // TX_ICLK, 2.304 MHz
  input  logic              rst_n,           // synchronous to clk, active low
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
  // protocol word to send, stable in this domain
  input  logic [PROTO_BITS-1:0] proto_word,
  // line
  output logic              las_tdata,
  output logic              frame_start,     // high while position 0 is counted
  // status
  output logic              vid_run,
  output logic              aud_run,
  output logic              slip             // a FIFO ran empty (sticky until reset)
);

  localparam int unsigned PW = $clog2(FRAME_BITS);

  logic [PW-1:0]          pos;
  logic [PROTO_BITS-1:0]  proto_sh;
  logic [3:0]             crc;
  logic                   line_bit;
  logic                   in_video, in_audio, in_proto, in_crc, in_faw;

  assign frame_start = (pos == '0);
  assign in_faw   = (pos <  PW'(POS_VIDEO));
  assign in_video = (pos >= PW'(POS_VIDEO)) && (pos < PW'(POS_AUDIO));
  assign in_audio = (pos >= PW'(POS_AUDIO)) && (pos < PW'(POS_PROTO));
  assign in_proto = (pos >= PW'(POS_PROTO)) && (pos < PW'(POS_CRC));
  assign in_crc   = (pos >= PW'(POS_CRC));

  // While a stream is stopped its FIFO is held at the start level by
  // discarding the surplus, one bit per clock.
  assign vid_rd_en = vid_run ? in_video : (vid_level > VID_LW'(START_VIDEO));
  assign aud_rd_en = aud_run ? in_audio : (aud_level > AUD_LW'(START_AUDIO));

  // Line time-division multiplexer.
  always_comb begin
    line_bit = 1'b1;
    if (in_faw)        line_bit = FAW_PATTERN[FAW_BITS - 1 - 32'(pos)];
    else if (in_video) line_bit = vid_run ? vid_rd_data : 1'b1;
    else if (in_audio) line_bit = aud_run ? aud_rd_data : 1'b1;
    else if (in_proto) line_bit = proto_sh[PROTO_BITS-1];
    else               line_bit = crc[3 - (32'(pos) - POS_CRC)];
  end

  crc4 u_crc (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (pos == PW'(FRAME_BITS - 1)),
    .en    (!in_crc),
    .din   (line_bit),
    .crc   (crc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      las_tdata <= 1'b1;
      proto_sh  <= '0;
      vid_run   <= 1'b0;
      aud_run   <= 1'b0;
      slip      <= 1'b0;
    end else begin
      pos       <= (pos == PW'(FRAME_BITS - 1)) ? '0 : pos + 1'b1;
      las_tdata <= line_bit;

      // Protocol data shifter: load one position before the protocol slot.
      if (pos == PW'(POS_PROTO - 1)) proto_sh <= proto_word;
      else if (in_proto)             proto_sh <= {proto_sh[PROTO_BITS-2:0], 1'b0};

      // Transmit FIFO control. The decision for a frame is taken when the
      // counter is at the last position of the previous frame.
      if (pos == PW'(FRAME_BITS - 1)) begin
        vid_run <= vid_run || (vid_level >= VID_LW'(START_VIDEO));
        aud_run <= aud_run || (aud_level >= AUD_LW'(START_AUDIO));
      end else begin
        if (vid_run && in_video && vid_empty) begin vid_run <= 1'b0; slip <= 1'b1; end
        if (aud_run && in_audio && aud_empty) begin aud_run <= 1'b0; slip <= 1'b1; end
      end
    end
  end

endmodule
