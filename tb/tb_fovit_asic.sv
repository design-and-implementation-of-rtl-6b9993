// tb_fovit_asic: end-to-end testbench of two FOVIT ASICs (units A and B)
// joined by a modelled fibre pair, all parameters at their defaults.
// Each unit has its own 2.048 MHz PCM clock (A 20 ppm fast, B 20 ppm slow) and a 2.304 MHz line clock locked
// at 9/8 of it (as its transmit PLL would make it); the receive side of the
// other unit gets that line clock as its recovered clock and a 2.048 MHz
// clock of the same rate as its receive PLL output. Random video and CODEC
// samples go in at both ends; the microcontrollers are modelled as bus tasks.
// Every mechanism of the design is made to happen and counted: frame
// alignment and its interrupt, video and voice across the link in both
// directions, protocol words through the registers with their interrupt,
// CRC errors from a noisy fibre (counter, reset cycle, threshold interrupt),
// loss of frame alignment from a cut fibre and its recovery, interrupt
// masking, a transmit FIFO slip from a stopped video clock, the command
// register reset, the general purpose I/O and the 16 kHz PLL divider outputs.
`timescale 1ns/1ps
module tb_fovit_asic;
  import fovit_pkg::*;

  localparam realtime T_PCM  = 9 * 54.2535;   // 488.28 ns, 2.048 MHz
  localparam realtime T_LINE = 8 * 54.2535;   // 434.03 ns, 2.304 MHz

  // ---------------- per-unit signals (index 0 = A, 1 = B) ----------------
  logic        reset_n = 1;
  logic        cs_n [2] = '{1, 1};
  logic        rw   [2] = '{1, 1};
  logic [3:0]  addr [2];
  logic [7:0]  data_i [2], data_o [2];
  logic        data_oe [2], irq_n [2];
  logic [15:0] io_i [2], io_o [2], io_oe [2];
  logic        tx_clk2 [2] = '{0, 0}, tx_iclk [2] = '{0, 0};
  logic        rx_clk2 [2] = '{0, 0};
  logic        vid_tx_data [2], aud_tx_data [2], fsx [2], las_tdata [2];
  logic        rx_iclk [2], las_rdata [2];
  logic        vid_rx_data [2], aud_rx_data [2], fsr [2];
  logic        clk_1 [2], clk_2 [2], clk_3 [2], clk_4 [2];

  int checks = 0, failures = 0;

  for (genvar u = 0; u < 2; u++) begin : g_unit
    fovit_asic dut (
      .reset_n (reset_n), .cs_n (cs_n[u]), .rw (rw[u]), .addr (addr[u]), .data_i (data_i[u]),
      .data_o (data_o[u]), .data_oe (data_oe[u]), .irq_n (irq_n[u]),
      .io_i (io_i[u]), .io_o (io_o[u]), .io_oe (io_oe[u]),
      .tx_clk2 (tx_clk2[u]), .vid_tx_data (vid_tx_data[u]), .aud_tx_data (aud_tx_data[u]), .fsx (fsx[u]),
      .tx_iclk (tx_iclk[u]), .las_tdata (las_tdata[u]),
      .rx_iclk (rx_iclk[u]), .las_rdata (las_rdata[u]),
      .rx_clk2 (rx_clk2[u]), .vid_rx_data (vid_rx_data[u]), .aud_rx_data (aud_rx_data[u]), .fsr (fsr[u]),
      .clk_1 (clk_1[u]), .clk_2 (clk_2[u]), .clk_3 (clk_3[u]), .clk_4 (clk_4[u])
    );
  end

  // ---------------- clocks ----------------
  // The video source is allowed +/-20 ppm: unit A runs 20 ppm fast and unit B
  // 20 ppm slow. Each receive PLL output follows the far end's clock.
  localparam real PPM_A = 1.0 - 20.0e-6, PPM_B = 1.0 + 20.0e-6;
  bit pcm_run [2] = '{1, 1};
  initial begin #3; forever #(PPM_A * T_PCM / 2)  if (pcm_run[0]) tx_clk2[0] = ~tx_clk2[0]; end
  initial begin #3; forever #(PPM_A * T_LINE / 2) tx_iclk[0] = ~tx_iclk[0]; end
  initial begin #111; forever #(PPM_B * T_PCM / 2)  if (pcm_run[1]) tx_clk2[1] = ~tx_clk2[1]; end
  initial begin #111; forever #(PPM_B * T_LINE / 2) tx_iclk[1] = ~tx_iclk[1]; end
  // Receive PLL outputs: same rate as the far end's PCM clock, own phase.
  initial begin #57;  forever #(PPM_A * T_PCM / 2) rx_clk2[1] = ~rx_clk2[1]; end
  initial begin #205; forever #(PPM_B * T_PCM / 2) rx_clk2[0] = ~rx_clk2[0]; end

  // ---------------- fibres: A -> B and B -> A ----------------
  bit cut [2] = '{0, 0};        // cut[u]: fibre into unit u carries no light
  int noise_frames [2] = '{0, 0};
  int noise_cnt [2] = '{0, 0};
  bit flip [2] = '{0, 0};
  assign rx_iclk[1] = tx_iclk[0];
  assign rx_iclk[0] = tx_iclk[1];
  assign las_rdata[1] = cut[1] ? 1'b0 : (las_tdata[0] ^ flip[1]);
  assign las_rdata[0] = cut[0] ? 1'b0 : (las_tdata[1] ^ flip[0]);
  // Noise: one bit flipped every 291 bits (3 positions further each frame,
  // so the alignment word is hit in at most two frames running).
  for (genvar u = 0; u < 2; u++) begin : g_noise
    always @(negedge rx_iclk[u]) begin
      flip[u] <= 1'b0;
      if (noise_frames[u] > 0) begin
        noise_cnt[u]++;
        if (noise_cnt[u] == 291) begin
          noise_cnt[u] = 0;
          flip[u] <= 1'b1;
          noise_frames[u]--;
        end
      end
    end
  end

  // ---------------- sources and sinks ----------------
  bit         vid_sent [2][$];
  logic [7:0] aud_sent [2][$];
  bit         vid_got  [2][$];
  logic [7:0] aud_got  [2][$];
  bit         capture = 0;
  int         fsx_cnt [2] = '{0, 0};

  for (genvar u = 0; u < 2; u++) begin : g_io
    int aud_k = -1, rk = -1;
    logic [7:0] ab, rb;
    always @(negedge tx_clk2[u]) begin
      bit b;
      b = 1'($urandom);
      vid_tx_data[u] <= b;
      vid_sent[u].push_back(b);
      if (fsx[u]) begin
        ab = 8'($urandom);
        aud_sent[u].push_back(ab);
        aud_k = 7;
        fsx_cnt[u]++;
      end else if (aud_k >= 0) begin
        aud_tx_data[u] <= ab[aud_k];
        aud_k--;
      end
    end
    always @(negedge rx_clk2[u]) begin
      if (capture) vid_got[u].push_back(vid_rx_data[u]);
      if (fsr[u]) rk = 7;
      else if (rk >= 0) begin
        rb[rk] = aud_rx_data[u];
        if (rk == 0 && capture) aud_got[u].push_back(rb);
        rk--;
      end
    end
  end

  // ---------------- helpers ----------------
  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  task automatic wr(input int u, input logic [3:0] a, input logic [7:0] d);
    addr[u] = a; data_i[u] = d; rw[u] = 0;
    #30 cs_n[u] = 0;
    #300 cs_n[u] = 1;
    #50 rw[u] = 1;
  endtask

  task automatic rd(input int u, input logic [3:0] a, output logic [7:0] d);
    addr[u] = a; rw[u] = 1;
    #30 cs_n[u] = 0;
    #200 d = data_o[u];
    #100 cs_n[u] = 1;
    #50;
  endtask

  task automatic frames(input int n);
    #(n * 125us);
  endtask

  // Video received at u must be a stretch of the video sent by the other unit.
  task automatic check_stream(input int u);
    int o, vi, ai, bad;
    o = 1 - u;
    vi = -1;
    for (int i = 0; i + 64 <= vid_sent[o].size() && vi < 0; i++) begin
      bit ok; ok = 1;
      for (int j = 0; j < 64 && ok; j++) if (vid_sent[o][i+j] != vid_got[u][j]) ok = 0;
      if (ok) vi = i;
    end
    bad = 0;
    if (vi >= 0) foreach (vid_got[u][i]) if (vid_got[u][i] != vid_sent[o][vi+i]) bad++;
    check($sformatf("video to unit %0d in order", u), vi >= 0 && bad == 0 && vid_got[u].size() > 5000);
    ai = -1;
    for (int i = 0; i + 3 <= aud_sent[o].size() && ai < 0; i++)
      if (aud_sent[o][i] == aud_got[u][0] && aud_sent[o][i+1] == aud_got[u][1]
          && aud_sent[o][i+2] == aud_got[u][2]) ai = i;
    bad = 0;
    if (ai >= 0) foreach (aud_got[u][i]) if (aud_got[u][i] != aud_sent[o][ai+i]) bad++;
    check($sformatf("voice to unit %0d in order", u), ai >= 0 && bad == 0 && aud_got[u].size() > 15);
    if (!(ai >= 0 && bad == 0)) $display("voice u=%0d ai=%0d bad=%0d got=%0d first=%h %h %h", u, ai, bad, aud_got[u].size(), aud_got[u][0], aud_got[u][1], aud_got[u][2]);
  endtask

  // ---------------- mechanism counters ----------------
  int n_align = 0, n_video = 0, n_voice = 0, n_proto = 0, n_crc = 0, n_thr = 0, n_lfa = 0,
      n_mask = 0, n_slip = 0, n_cmdreset = 0, n_gpio = 0, n_div = 0, n_irq = 0;

  always @(negedge irq_n[0] or negedge irq_n[1]) n_irq++;

  initial begin
    #300ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d, lo, hi;
    realtime t0, t1;
    io_i[0] = 16'h0000; io_i[1] = 16'h0000;
    addr[0] = 0; addr[1] = 0; data_i[0] = 0; data_i[1] = 0;
    #1us reset_n = 0;
    #2us reset_n = 1;

    // 1. Frame alignment at both ends.
    frames(12);
    for (int u = 0; u < 2; u++) begin
      rd(u, 4'h0, d);
      check($sformatf("unit %0d aligned", u), d[0] && !d[1]);
      check($sformatf("unit %0d IRQ from sync", u), !irq_n[u]);
      rd(u, 4'h1, d);
      check($sformatf("unit %0d sync source", u), d[3]);
      if (d[3]) n_align++;
      #10us;
      rd(u, 4'h1, d);
      check($sformatf("unit %0d sources cleared by read", u), d == 8'h00 && irq_n[u]);
    end

    // 2. Video and voice in both directions.
    frames(4);
    capture = 1;
    frames(30);
    capture = 0;
    for (int u = 0; u < 2; u++) begin
      int f0;
      f0 = failures;
      check_stream(u);
      if (failures == f0) begin n_video++; n_voice++; end
    end
    check("FSX once per 125 us", fsx_cnt[0] > 40 && fsx_cnt[1] > 40);

    // 3. Protocol word A -> B and B -> A.
    wr(0, 4'h9, 8'h5A); wr(0, 4'hA, 8'hC3);
    wr(1, 4'h9, 8'h11); wr(1, 4'hA, 8'h22);
    frames(3);
    check("B IRQ on protocol", !irq_n[1]);
    rd(1, 4'h1, d); check("B protocol source", d == 8'h04);
    rd(1, 4'h9, lo); rd(1, 4'hA, hi);
    check("B received protocol word", {hi, lo} == 16'hC35A);
    rd(0, 4'h9, lo); rd(0, 4'hA, hi);
    check("A received protocol word", {hi, lo} == 16'h2211);
    rd(0, 4'h1, d);
    if ({hi, lo} == 16'h2211) n_proto++;

    // 4. GPIO on A.
    wr(0, 4'h5, 8'hFF); wr(0, 4'h7, 8'h96);
    io_i[0] = 16'hAB00;
    check("A GPIO out", io_o[0][7:0] == 8'h96 && io_oe[0] == 16'h00FF);
    rd(0, 4'h8, d); check("A GPIO in", d == 8'hAB);
    rd(0, 4'h7, d); check("A GPIO readback", d == 8'h96);
    n_gpio++;

    // 5. CRC errors on the fibre into B. No reset cycle first (cycle_len 0):
    //    the register follows the count. 20 errored frames pass the threshold.
    wr(1, 4'h2, 8'd0); wr(1, 4'h3, 8'd0);
    frames(2);
    rd(1, 4'h2, lo); rd(1, 4'h3, hi);
    check("B no CRC errors on a clean link", {hi, lo} == 16'd0);
    rd(1, 4'h1, d);
    noise_frames[1] = 20;
    frames(25);
    rd(1, 4'h0, d);
    check("B over CRC threshold", d[2]);
    check("B still aligned through the noise", d[0]);
    check("B IRQ from CRC threshold", !irq_n[1]);
    rd(1, 4'h1, d); check("B CRC threshold source", d[1]);
    if (d[1]) n_thr++;
    rd(1, 4'h2, lo); rd(1, 4'h3, hi);
    check("B CRC errors counted", {hi, lo} == 16'd20);
    if ({hi, lo} == 16'd20) n_crc++;
    // A reset cycle of 100 frames: the running cycle ends within 100 frames,
    // the next one is clean and then reads 0.
    wr(1, 4'h2, 8'd100); wr(1, 4'h3, 8'd0);
    frames(205);
    rd(1, 4'h2, lo); rd(1, 4'h3, hi);
    check("B clean cycle reads 0", {hi, lo} == 16'd0);
    rd(1, 4'h0, d); check("B threshold status ends with the cycle", !d[2]);

    // 6. Cut the fibre into B: loss of frame alignment, then recovery.
    rd(1, 4'h1, d);
    cut[1] = 1;
    frames(6);
    rd(1, 4'h0, d); check("B LFA status", d[1] && !d[0]);
    check("B IRQ from LFA", !irq_n[1]);
    rd(1, 4'h1, d); check("B LFA source", d[0]);
    if (d[0]) n_lfa++;
    cut[1] = 0;
    frames(10);
    rd(1, 4'h0, d); check("B aligned again", d[0]);
    rd(1, 4'h1, d); check("B sync source after recovery", d[3]);

    // 7. Masking: mask LFA on B, cut again: no IRQ, source still recorded.
    wr(1, 4'h1, 8'h09);                  // mask LFA and sync
    cut[1] = 1;
    frames(6);
    check("B IRQ masked", irq_n[1]);
    rd(1, 4'h1, d); check("B masked LFA still recorded", d[0]);
    if (d[0] && irq_n[1]) n_mask++;
    cut[1] = 0;
    frames(10);
    wr(1, 4'h1, 8'h00);
    rd(1, 4'h1, d);

    // 8. Transmit FIFO slip on A: its video clock stops for 100 us.
    pcm_run[0] = 0; #100us; pcm_run[0] = 1;
    frames(4);
    rd(0, 4'h0, d); check("A transmit slip status", d[3]);
    if (d[3]) n_slip++;
    frames(20);
    rd(1, 4'h0, d); check("B aligned after A's slip", d[0]);

    // 9. Command register reset of A: B loses A's frames, both recover.
    rd(1, 4'h1, d);
    wr(0, 4'h0, 8'h01);
    frames(6);
    rd(0, 4'h0, d); check("A command reset status", d[7]);
    rd(1, 4'h0, d); check("B LFA while A is reset", d[1]);
    wr(0, 4'h0, 8'h00);
    frames(12);
    rd(1, 4'h0, d); check("B aligned after A's reset", d[0]);
    rd(0, 4'h0, d); check("A aligned after its reset, slip cleared", d[0] && !d[3]);
    rd(0, 4'h7, d); check("A GPIO kept through command reset", d == 8'h96);
    if (d == 8'h96) n_cmdreset++;
    // Streams resume after the reset.
    vid_got[0] = {}; vid_got[1] = {}; aud_got[0] = {}; aud_got[1] = {};
    frames(4);
    capture = 1; frames(20); capture = 0;
    check_stream(0); check_stream(1);

    // 10. PLL divider outputs: 16 kHz each (62.5 us).
    for (int u = 0; u < 2; u++) begin
      @(posedge clk_1[u]) t0 = $realtime; @(posedge clk_1[u]) t1 = $realtime;
      check("CLK_1 62.5 us", t1 - t0 > 62.49us && t1 - t0 < 62.51us);
      @(posedge clk_2[u]) t0 = $realtime; @(posedge clk_2[u]) t1 = $realtime;
      check("CLK_2 62.5 us", t1 - t0 > 62.49us && t1 - t0 < 62.51us);
      @(posedge clk_3[u]) t0 = $realtime; @(posedge clk_3[u]) t1 = $realtime;
      check("CLK_3 62.5 us", t1 - t0 > 62.49us && t1 - t0 < 62.51us);
      @(posedge clk_4[u]) t0 = $realtime; @(posedge clk_4[u]) t1 = $realtime;
      check("CLK_4 62.5 us", t1 - t0 > 62.49us && t1 - t0 < 62.51us);
      n_div++;
    end

    // Every mechanism happened.
    $display("mechanisms: align=%0d video=%0d voice=%0d proto=%0d crc_err=%0d crc_thr=%0d lfa=%0d mask=%0d slip=%0d cmd_reset=%0d gpio=%0d pll_div=%0d irq=%0d",
             n_align, n_video, n_voice, n_proto, n_crc, n_thr, n_lfa, n_mask, n_slip, n_cmdreset, n_gpio, n_div, n_irq);
    check("alignment happened", n_align > 0);
    check("video happened", n_video > 0);
    check("voice happened", n_voice > 0);
    check("protocol happened", n_proto > 0);
    check("CRC errors happened", n_crc > 0);
    check("CRC threshold happened", n_thr > 0);
    check("LFA happened", n_lfa > 0);
    check("masking happened", n_mask > 0);
    check("slip happened", n_slip > 0);
    check("command reset happened", n_cmdreset > 0);
    check("GPIO happened", n_gpio > 0);
    check("PLL dividers ran", n_div > 0);
    check("IRQ asserted", n_irq > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
