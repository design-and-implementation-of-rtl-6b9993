// crc_err_monitor: CRC error counter and threshold detector of the FOVIT
// receiver, for line quality monitoring. Clocked by RX_ICLK.
//
// A measurement cycle lasts cycle_len received frames (the CRC reset cycle
// written by the microcontroller; 8000 frames = 1 s). During a cycle the
// 16-bit, saturating counter counts frames with a CRC error. At the end of
// the cycle the count is copied to err_count, the value the microcontroller
// reads, and the counter restarts. cycle_len = 0 means no cycle: the counter
// never restarts and err_count follows it frame by frame. thr_event pulses
// once per cycle when the count first exceeds THRESHOLD, and over_thr stays
// high from then until the cycle ends. Only frames received in frame
// alignment are counted (frame_end). The 16-bit counter, its reset cycle and
// the threshold interrupt follow the source; what exactly a "reset cycle"
// counts, the latching and the threshold value are this design's choices.
module crc_err_monitor #(
  parameter logic [15:0] THRESHOLD = 16'd16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_end,     // one pulse per received frame
  input  logic        crc_err,       // with frame_end: that frame had a CRC error
  input  logic [15:0] cycle_len,     // frames per measurement cycle, 0 = endless
  output logic [15:0] err_count,     // count of the last completed cycle
  output logic        over_thr,
  output logic        thr_event
);

  logic [15:0] run_cnt, run_next, frame_cnt;
  logic        cycle_done;

  assign run_next   = (crc_err && run_cnt != 16'hFFFF) ? run_cnt + 1'b1 : run_cnt;
  assign cycle_done = (cycle_len != '0) && (frame_cnt >= cycle_len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_cnt   <= '0;
      frame_cnt <= '0;
      err_count <= '0;
      over_thr  <= 1'b0;
      thr_event <= 1'b0;
    end else begin
      thr_event <= 1'b0;
      if (frame_end) begin
        if (run_next > THRESHOLD && !over_thr) thr_event <= 1'b1;
        if (cycle_done) begin
          err_count <= run_next;
          run_cnt   <= '0;
          frame_cnt <= '0;
          over_thr  <= 1'b0;
        end else begin
          if (cycle_len == '0) err_count <= run_next;
          run_cnt   <= run_next;
          frame_cnt <= frame_cnt + 1'b1;
          over_thr  <= (run_next > THRESHOLD);
        end
      end
    end
  end

endmodule
