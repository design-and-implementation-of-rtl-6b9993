// tb_fovit_receiver: self-checking testbench for fovit_receiver.
// A frame generator here builds 288-bit line frames (alignment word, random
// video and audio, protocol word, CRC-4 computed here) and sends them at
// 2.304 Mbit/s after a stretch of random bits. RX_CLK2 runs at exactly 8/9 of
// RX_ICLK. Checks: frame alignment is found and reported (sync interrupt);
// VID_RX_DATA is the sent video in order and each 8-bit sample after FSR is
// the sent audio in order; FSR comes every 256 clocks; the protocol word is
// accepted and flagged, but not from a frame with a bad CRC; frames with a
// corrupted bit are counted in the CRC error register at the end of the
// CRC reset cycle and crossing the threshold raises its interrupt; a single
// missing alignment word keeps alignment while three in a row lose it (LFA
// interrupt) and alignment comes back; clearing through clr_mask/clr_tgl
// clears exactly the flags named.
`timescale 1ns/1ps
module tb_fovit_receiver;
  import fovit_pkg::*;

  logic arst_n = 0, rx_iclk = 0, rx_clk2 = 0, las_rdata = 0;
  logic vid_rx_data, aud_rx_data, fsr;
  logic [15:0] cycle_len = 16'd16;
  irq_vec_t clr_mask = '0, irq_flags;
  logic clr_tgl = 0;
  logic clr_ack;
  logic [15:0] crc_err_count, proto_rx_word;
  logic in_sync, crc_over_thr, rx_slip, rx_overflow;
  int checks = 0, failures = 0;

  fovit_receiver #(.CRC_THRESHOLD(16'd3)) dut (.*);

  always #(8 * 27.126) rx_iclk = ~rx_iclk;
  always #(9 * 27.126) rx_clk2 = ~rx_clk2;

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %t", what, $time); end
  endtask

  // ---------------- frame generator ----------------
  bit          q[$];
  bit          vid_sent[$];
  logic [7:0]  aud_sent[$];
  logic [15:0] tx_proto = 16'h0000;
  int          garbage_bits = 1000;
  int          bad_video_frames = 0, bad_faw_frames = 0, bad_crc_frames = 0;
  int          frames_sent = 0;

  function automatic logic [3:0] crc_of(ref bit f[$]);
    bit [4:0] r = '0;
    for (int i = 0; i < 288; i++) begin
      r = {r[3:0], (i < 284) ? f[i] : 1'b0};
      if (r[4]) r ^= 5'b10011;
    end
    return r[3:0];
  endfunction

  task automatic build_frame();
    bit f[$];
    logic [3:0] c;
    logic [7:0] a;
    for (int i = 3; i >= 0; i--) f.push_back(FAW_PATTERN[i]);
    for (int i = 0; i < 256; i++) begin bit b; b = 1'($urandom); f.push_back(b); vid_sent.push_back(b); end
    a = 8'($urandom); aud_sent.push_back(a);
    for (int i = 7; i >= 0; i--) f.push_back(a[i]);
    for (int i = 15; i >= 0; i--) f.push_back(tx_proto[i]);
    repeat (4) f.push_back(1'b0);
    c = crc_of(f);
    for (int i = 0; i < 4; i++) f[284+i] = c[3-i];
    if (bad_video_frames > 0) begin f[100] = !f[100]; bad_video_frames--; end
    if (bad_faw_frames > 0)   begin f[1] = !f[1];     bad_faw_frames--; end
    if (bad_crc_frames > 0)   begin f[287] = !f[287]; bad_crc_frames--; end
    foreach (f[i]) q.push_back(f[i]);
    frames_sent++;
  endtask

  always @(negedge rx_iclk) begin
    if (garbage_bits > 0) begin
      las_rdata <= 1'($urandom);
      garbage_bits--;
    end else begin
      if (q.size() == 0) build_frame();
      las_rdata <= q.pop_front();
    end
  end

  task automatic wait_frames(input int n);
    int target;
    target = frames_sent + n;
    while (frames_sent < target) @(negedge rx_iclk);
  endtask

  // ---------------- PCM side capture ----------------
  bit         vid_out[$];
  logic [7:0] aud_out[$];
  int         aud_k = -1;
  logic [7:0] aud_b;
  int         fsr_gap = 0, fsr_gaps_ok = 0, fsr_gaps_bad = 0;
  bit         capture = 0;

  always @(negedge rx_clk2) begin
    fsr_gap++;
    if (fsr) begin
      if (capture) begin if (fsr_gap == 256) fsr_gaps_ok++; else fsr_gaps_bad++; end
      fsr_gap = 0;
      aud_k = 7;
    end else if (aud_k >= 0) begin
      aud_b[aud_k] = aud_rx_data;
      if (aud_k == 0 && capture) aud_out.push_back(aud_b);
      aud_k--;
    end
    if (capture) vid_out.push_back(vid_rx_data);
  end

  task automatic clear_flags(input irq_vec_t m);
    clr_mask = m;
    #1us clr_tgl = ~clr_tgl;
    check("clear not yet acknowledged", clr_ack != clr_tgl);
    #5us;
    check("clear acknowledged", clr_ack == clr_tgl);
  endtask

  initial begin
    irq_vec_t none;
    none = '0;
    #2us arst_n = 1;
    // Random bits first: no alignment yet.
    #(200us);
    check("not aligned during random bits", !in_sync);
    wait (garbage_bits == 0);
    wait_frames(7);
    #1us;
    check("aligned after 6 good frames", in_sync);
    check("sync interrupt flagged", irq_flags.sync);
    check("no LFA flagged", !irq_flags.lfa);
    // Protocol word.
    tx_proto = 16'hBEEF;
    wait_frames(3);
    check("protocol word received", proto_rx_word == 16'hBEEF);
    check("protocol interrupt flagged", irq_flags.proto_rx);
    clear_flags('{sync: 1'b1, proto_rx: 1'b0, crc_thr: 1'b0, lfa: 1'b0});
    check("clear removes only the named flag", !irq_flags.sync && irq_flags.proto_rx);
    clear_flags('{sync: 1'b0, proto_rx: 1'b1, crc_thr: 1'b0, lfa: 1'b0});
    check("protocol flag cleared", !irq_flags.proto_rx);
    // Clean stretch: video and audio continuity.
    wait_frames(6);
    capture = 1;
    wait_frames(30);
    capture = 0;
    begin
      int vi, ai, bad;
      vi = -1;
      for (int i = 0; i + 64 <= vid_sent.size() && vi < 0; i++) begin
        bit ok; ok = 1;
        for (int j = 0; j < 64 && ok; j++) if (vid_sent[i+j] != vid_out[j]) ok = 0;
        if (ok) vi = i;
      end
      check("video found in output", vi >= 0);
      bad = 0;
      if (vi >= 0) foreach (vid_out[i]) if (vid_out[i] != vid_sent[vi+i]) bad++;
      check("video bits in order", bad == 0 && vid_out.size() > 7000);
      ai = -1;
      for (int i = 0; i + 3 <= aud_sent.size() && ai < 0; i++)
        if (aud_sent[i] == aud_out[0] && aud_sent[i+1] == aud_out[1] && aud_sent[i+2] == aud_out[2]) ai = i;
      check("audio found in output", ai >= 0);
      bad = 0;
      if (ai >= 0) foreach (aud_out[i]) if (aud_out[i] != aud_sent[ai+i]) bad++;
      check("audio samples in order", bad == 0 && aud_out.size() > 25);
      check("FSR every 256 clocks", fsr_gaps_ok > 25 && fsr_gaps_bad == 0);
      check("no slip or overflow", !rx_slip && !rx_overflow);
    end
    // A new protocol word in a frame with a bad CRC is not accepted.
    wait_frames(1);
    bad_crc_frames = 1; tx_proto = 16'h1234;
    wait_frames(2);
    #1us check("word from bad-CRC frame rejected", proto_rx_word == 16'hBEEF);
    wait_frames(1);
    #1us check("word accepted from next good frame", proto_rx_word == 16'h1234);
    // CRC error counting, first with no reset cycle (cycle_len = 0): the
    // register follows the count; one error so far, from the bad-CRC frame.
    begin
      logic [15:0] base;
      cycle_len = 16'd0;
      wait_frames(2);
      base = crc_err_count;
      check("one error so far", base == 1);
      bad_video_frames = 2;
      wait_frames(4);
      check("2 more errors counted", crc_err_count == base + 2);
      check("3 errors not over threshold 3", !irq_flags.crc_thr && !crc_over_thr);
      bad_video_frames = 2;
      wait_frames(4);
      check("5 errors counted", crc_err_count == base + 4);
      check("over threshold status", crc_over_thr);
      check("threshold interrupt", irq_flags.crc_thr);
    end
    // Reset cycle of 16 frames: a clean cycle reads 0, a cycle with one error 1.
    cycle_len = 16'd16;
    wait_frames(40);
    check("clean cycle counts 0", crc_err_count == 0);
    check("over threshold ends with the cycle", !crc_over_thr);
    bad_video_frames = 1;
    begin
      int n;
      n = 0;
      while (crc_err_count == 0 && n < 40) begin wait_frames(1); n++; end
      check("1 error latched at cycle end", crc_err_count == 1 && n > 0);
    end
    wait_frames(20);
    check("next clean cycle counts 0", crc_err_count == 0);
    check("still aligned with CRC errors", in_sync);
    // One missing alignment word: alignment kept.
    bad_faw_frames = 1;
    wait_frames(3);
    check("single FAW error keeps alignment", in_sync && !irq_flags.lfa);
    // Three in a row: loss of frame alignment.
    clear_flags('{sync: 1'b1, proto_rx: 1'b1, crc_thr: 1'b1, lfa: 1'b1});
    bad_faw_frames = 3;
    wait_frames(4);
    check("LFA after 3 missing FAW", !in_sync);
    check("LFA interrupt", irq_flags.lfa);
    wait_frames(5);
    check("alignment recovered", in_sync);
    check("sync interrupt after recovery", irq_flags.sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
