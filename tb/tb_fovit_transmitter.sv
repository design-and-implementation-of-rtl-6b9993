// tb_fovit_transmitter: self-checking testbench for fovit_transmitter.
// Drives random video at 2.048 Mbit/s, a CODEC model that puts one random
// 8-bit sample on AUD_TX_DATA in the 8 clock periods after each FSX pulse,
// and two protocol words. Records LAS_TDATA, finds the 288-bit frames on its
// own, and checks in every frame: the alignment word, the CRC-4 (computed here
// by polynomial division), the protocol word, that the video bits are the
// input video in order with none lost or repeated, and that the audio bytes
// are the CODEC samples in order. Also checks the FSX period (256 clocks), the
// frame period (125 us), and that stopping TX_CLK2 for a while makes the
// video FIFO run empty (slip) and the framer recover.
`timescale 1ns/1ps
module tb_fovit_transmitter;
  import fovit_pkg::*;

  logic arst_n = 0, tx_clk2 = 0, tx_iclk = 0, vid_tx_data = 0, aud_tx_data = 0;
  logic fsx, las_tdata, frame_start, tx_slip, tx_overflow, vid_run, aud_run;
  logic [15:0] proto_word = 16'h0000;
  logic proto_tgl = 0;
  int checks = 0, failures = 0;

  fovit_transmitter dut (.*);

  // TX_ICLK locked at exactly 9/8 of TX_CLK2.
  bit clk2_en = 1;
  always #(9 * 27.126) if (clk2_en) tx_clk2 = ~tx_clk2;
  always #(8 * 27.126) tx_iclk = ~tx_iclk;

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

  // ---------------- sources ----------------
  // ---------------- sources ----------------
  bit         vid_sent[$];
  logic [7:0] aud_sent[$];
  int         aud_bit = -1;
  logic [7:0] aud_byte;
  realtime    fsx_t[$];

  always @(negedge tx_clk2) begin
    bit b;
    b = 1'($urandom);
    vid_tx_data <= b;
    if (arst_n) vid_sent.push_back(b);
    // CODEC model: FSX seen high -> 8 bits in the next 8 periods, MSB first.
    if (fsx) begin
      aud_byte = 8'($urandom);
      aud_sent.push_back(aud_byte);
      aud_bit = 7;
      fsx_t.push_back($realtime);
    end else if (aud_bit >= 0) begin
      aud_tx_data <= aud_byte[aud_bit];
      aud_bit--;
    end
  end

  // ---------------- line capture ----------------
  bit      line[$];
  realtime line_t[$];
  always @(negedge tx_iclk) if (arst_n) begin line.push_back(las_tdata); line_t.push_back($realtime); end

  function automatic logic [3:0] ref_crc(input int start);
    bit [4:0] r = '0;
    for (int i = 0; i < 288; i++) begin
      r = {r[3:0], (i < 284) ? line[start + i] : 1'b0};
      if (r[4]) r ^= 5'b10011;
    end
    return r[3:0];
  endfunction

  function automatic int find_in(ref bit s[$], ref bit pat[$]);
    for (int i = 0; i + pat.size() <= s.size(); i++) begin
      bit ok = 1;
      for (int j = 0; j < 64 && ok; j++) if (s[i+j] != pat[j]) ok = 0;
      if (ok) return i;
    end
    return -1;
  endfunction

  // Analyse frames [f0, f1) of the capture starting at bit offset off.
  task automatic analyse(input int off, input int f0, input int f1, input logic [15:0] exp_proto,
                         input bit chk_av);
    bit vid_rx[$];
    logic [7:0] aud_rx[$];
    int vi, ai;
    for (int f = f0; f < f1; f++) begin
      int s = off + f * 288;
      logic [3:0] faw, crc;
      logic [15:0] pw;
      logic [7:0] ab;
      for (int i = 0; i < 4; i++)  faw[3-i] = line[s+i];
      for (int i = 0; i < 16; i++) pw[15-i] = line[s+268+i];
      for (int i = 0; i < 4; i++)  crc[3-i] = line[s+284+i];
      for (int i = 0; i < 8; i++)  ab[7-i] = line[s+260+i];
      check("FAW", faw == FAW_PATTERN);
      check("CRC-4", crc == ref_crc(s));
      check("protocol word", pw == exp_proto);
      for (int i = 0; i < 256; i++) vid_rx.push_back(line[s+4+i]);
      aud_rx.push_back(ab);
      if (f > f0) check("frame period 125 us", (line_t[s] - line_t[s-288]) > 124.99us &&
                                             (line_t[s] - line_t[s-288]) < 125.01us);
    end
    if (chk_av) begin
      vi = find_in(vid_sent, vid_rx);
      check("video stream found", vi >= 0);
      if (vi >= 0) begin
        int bad = 0;
        foreach (vid_rx[i]) if (vid_rx[i] != vid_sent[vi+i]) bad++;
        check("video bits in order", bad == 0);
      end
      ai = -1;
      for (int i = 0; i + 4 <= aud_sent.size(); i++)
        if (aud_sent[i] == aud_rx[0] && aud_sent[i+1] == aud_rx[1] && aud_sent[i+2] == aud_rx[2]
            && aud_sent[i+3] == aud_rx[3]) begin ai = i; break; end
      check("audio stream found", ai >= 0);
      if (ai >= 0) begin
        int bad = 0;
        foreach (aud_rx[i]) if (aud_rx[i] != aud_sent[ai+i]) bad++;
        check("audio bytes in order", bad == 0);
      end
    end
  endtask

  initial begin
    int off;
    #2us arst_n = 1;
    proto_word = 16'hA5C3; proto_tgl = ~proto_tgl;
    #(30 * 125us);
    check("streams running", vid_run && aud_run);
    check("no slip", !tx_slip && !tx_overflow);
    proto_word = 16'h3C5A; proto_tgl = ~proto_tgl;
    #(10 * 125us);
    // Find the frame phase: the offset where the FAW repeats and the CRC holds.
    off = -1;
    for (int o = 0; o < 288 && off < 0; o++) begin
      bit ok;
      ok = 1;
      for (int f = 1; f < 6; f++) begin
        logic [3:0] faw, crc;
        for (int i = 0; i < 4; i++) faw[3-i] = line[o + f*288 + i];
        for (int i = 0; i < 4; i++) crc[3-i] = line[o + f*288 + 284 + i];
        if (faw != FAW_PATTERN || crc != ref_crc(o + f*288)) ok = 0;
      end
      if (ok) off = o;
    end
    check("frame phase found", off >= 0);
    if (off < 0) off = 0;
    analyse(off, 4, 28, 16'hA5C3, 1);
    analyse(off, 33, 38, 16'h3C5A, 1);
    // FSX every 256 periods of TX_CLK2 (125 us).
    check("FSX period", (fsx_t[10] - fsx_t[9]) > 124.99us && (fsx_t[10] - fsx_t[9]) < 125.01us);
    // Starve the video FIFO: stop TX_CLK2 for 100 us.
    clk2_en = 0; #100us; clk2_en = 1;
    #(2 * 125us);
    check("slip flagged after TX_CLK2 stop", tx_slip);
    #(20 * 125us);
    check("streams running again", vid_run && aud_run);
    begin
      int n;
      n = (line.size() - off) / 288;
      analyse(off, n - 8, n - 1, 16'h3C5A, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
