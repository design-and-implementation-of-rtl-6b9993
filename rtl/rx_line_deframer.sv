// rx_line_deframer: laser receive frame alignment, line demultiplexer, CRC-4
// checker and receive protocol shifter of the FOVIT ASIC, clocked by the
// 2.304 MHz recovered line clock RX_ICLK.
//
// Frame alignment: the alignment word has only 4 bits, so in random video it
// appears by chance about every 16 bits and a search that tests one candidate
// position at a time would seldom reach the true one. The search (HUNT)
// therefore tests all 288 bit phases in parallel: a free-running phase counter
// addresses a 288-entry table holding, for each phase, how many frames in a
// row the alignment word has been seen ending at that phase. When one phase
// reaches CONFIRM_FRAMES the deframer locks to it (SYNC; sync_event). The
// chance that a random phase reaches 6 is about 287 / 16^6, 2e-5 per frame.
// In SYNC, LOSS_FRAMES consecutive frames without the alignment word return
// to HUNT (loss of frame alignment; lfa_event). The table is cleared while in
// SYNC and in the first frame after reset (CLEAR), so each search starts
// afresh.
//
// Only in SYNC are the fields passed on: the 256 video bits and the 8 audio
// bits of each frame are written into the receive FIFOs as they arrive, the
// 16 protocol bits are shifted in, and the CRC-4 of bits 0..283 is compared
// with the received CRC. frame_end pulses at the last bit of every frame in
// SYNC, with crc_err set for a mismatch; the frame in which alignment is
// found is not reported, as its first bits went by before the lock. A
// protocol word is accepted (proto_word, proto_new pulse) from a frame that
// began with the alignment word, has a good CRC and carries a word different
// from the last one accepted; an all-zero line (dark fibre) passes the CRC,
// which is why the alignment word is required too. All outputs are registered except the FIFO
// write strobes, which are valid in the clock period of the bit they carry.
// That the receive operations are enabled only by detection of the correct
// sync word follows the source; the parallel search, the confirm and loss
// counts and the protocol acceptance rule are this design's choices.
module rx_line_deframer
  import fovit_pkg::*;
#(
  parameter int unsigned CONFIRM_FRAMES = 6,   // 1..7
  parameter int unsigned LOSS_FRAMES    = 3
) (
  input  logic                  clk,        // RX_ICLK, 2.304 MHz
  input  logic                  rst_n,      // synchronous to clk, active low
  input  logic                  las_rdata,
  // receive FIFO write ports
  output logic                  vid_wr_en,
  output logic                  vid_wr_data,
  output logic                  aud_wr_en,
  output logic                  aud_wr_data,
  // frame status
  output logic                  in_sync,
  output logic                  frame_end,
  output logic                  crc_err,
  output logic                  sync_event,
  output logic                  lfa_event,
  // protocol
  output logic [PROTO_BITS-1:0] proto_word,
  output logic                  proto_new
);

  localparam int unsigned PW = $clog2(FRAME_BITS);

  typedef enum logic [1:0] {CLEAR, HUNT, SYNC} align_state_e;

  align_state_e          state;
  logic [PW-1:0]         pos;          // position of the bit now at las_rdata
  logic [FAW_BITS-2:0]   hist;         // the bits before it
  logic [3:0]            cnt;          // miss counter in SYNC
  logic                  whole;        // the frame now ending was seen from its first bit
  logic                  faw_ok;       // this frame began with the alignment word
  logic [PW-1:0]         phase;        // search phase, free-running 0..287
  logic [2:0]            run_len [FRAME_BITS];   // consecutive FAW sightings per phase
  logic [2:0]            run_cur, run_new;
  logic [3:0]            crc;
  logic [2:0]            rx_crc;      // first three received CRC bits
  logic [PROTO_BITS-1:0] proto_sh;
  logic                  faw_now, at_faw_end, at_end;
  logic                  in_video, in_audio, in_proto, in_crc;

  assign faw_now    = ({hist, las_rdata} == FAW_PATTERN);
  assign run_cur    = run_len[phase];
  assign run_new    = (faw_now && run_cur != 3'd7) ? run_cur + 1'b1 : (faw_now ? run_cur : 3'd0);

  // Search table: one read-modify-write per clock at the current phase.
  always_ff @(posedge clk) begin
    if (state == HUNT) run_len[phase] <= run_new;
    else               run_len[phase] <= '0;
  end
  assign at_faw_end = (pos == PW'(FAW_BITS - 1));
  assign at_end     = (pos == PW'(FRAME_BITS - 1));
  assign in_video   = (pos >= PW'(POS_VIDEO)) && (pos < PW'(POS_AUDIO));
  assign in_audio   = (pos >= PW'(POS_AUDIO)) && (pos < PW'(POS_PROTO));
  assign in_proto   = (pos >= PW'(POS_PROTO)) && (pos < PW'(POS_CRC));
  assign in_crc     = (pos >= PW'(POS_CRC));

  assign in_sync     = (state == SYNC);
  assign vid_wr_en   = in_sync && in_video;
  assign vid_wr_data = las_rdata;
  assign aud_wr_en   = in_sync && in_audio;
  assign aud_wr_data = las_rdata;

  // CRC-4 checker over positions 0..283 of the frame being received.
  crc4 u_crc (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (at_end || state != SYNC),
    .en    (!in_crc),
    .din   (las_rdata),
    .crc   (crc)
  );

  logic crc_bad;
  assign crc_bad = ({rx_crc, las_rdata} != crc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= CLEAR;
      pos        <= '0;
      phase      <= '0;
      hist       <= '0;
      cnt        <= '0;
      whole      <= 1'b0;
      faw_ok     <= 1'b0;
      rx_crc     <= '0;
      proto_sh   <= '0;
      proto_word <= '0;
      proto_new  <= 1'b0;
      frame_end  <= 1'b0;
      crc_err    <= 1'b0;
      sync_event <= 1'b0;
      lfa_event  <= 1'b0;
    end else begin
      hist       <= {hist[FAW_BITS-3:0], las_rdata};
      proto_new  <= 1'b0;
      frame_end  <= 1'b0;
      crc_err    <= 1'b0;
      sync_event <= 1'b0;
      lfa_event  <= 1'b0;
      pos        <= at_end ? '0 : pos + 1'b1;
      phase      <= (phase == PW'(FRAME_BITS - 1)) ? '0 : phase + 1'b1;

      unique case (state)
        CLEAR: begin
          if (phase == PW'(FRAME_BITS - 1)) state <= HUNT;
        end
        HUNT: begin
          if (faw_now && run_cur == 3'(CONFIRM_FRAMES - 1)) begin
            state      <= SYNC;
            sync_event <= 1'b1;
            cnt        <= '0;
            whole      <= 1'b0;
            pos        <= PW'(FAW_BITS);
          end
        end
        SYNC: begin
          if (at_faw_end) begin
            faw_ok <= faw_now;
            if (faw_now) begin
              cnt <= '0;
            end else if (cnt == 4'(LOSS_FRAMES - 1)) begin
              state     <= HUNT;
              lfa_event <= 1'b1;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          if (in_proto) proto_sh <= {proto_sh[PROTO_BITS-2:0], las_rdata};
          if (in_crc)   rx_crc   <= {rx_crc[1:0], las_rdata};
          if (at_end) whole <= 1'b1;
          if (at_end && whole) begin
            frame_end <= 1'b1;
            crc_err   <= crc_bad;
            if (faw_ok && !crc_bad && proto_sh != proto_word) begin
              proto_word <= proto_sh;
              proto_new  <= 1'b1;
            end
          end
        end
        default: state <= CLEAR;
      endcase
    end
  end

endmodule
