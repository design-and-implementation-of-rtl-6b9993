// tb_fovit_rs232_relay: workload testbench for the microcontroller channel,
// run on two FOVIT ASICs (units A and B) at their default parameters, joined
// by a fibre pair and carrying random video and voice at the same time.
//
// Each unit has a modelled microcontroller that relays a serial port: it
// sends bytes through the transmit protocol registers (low byte first, then
// the high byte, which hands the word to the transmitter) and receives the
// far end's bytes on the "protocol word received" interrupt by reading the
// interrupt source register and the received protocol registers. A word
// carries {7-bit sequence number, 1 spare bit = 0, data byte}, so that
// consecutive words always differ, as the receiver reports only changed
// words. Both directions run at once.
//
// Phase 1 sends 24 bytes each way at the pace of a 19.2 kbit/s serial port
// with 10-bit characters (one byte every 520.8 us). Phase 2 sends 24 more
// bytes each way with one byte every 250 us (two line frames), 2.1 times that
// rate. Checks: every byte arrives once, in order, with the right sequence
// number; the time from the sender's high-byte write to the receiver's
// interrupt is at most two line frames (250 us); both units stay aligned and
// no CRC error is counted. The word format and the pacing belong to this
// test, not to the chip.
`timescale 1ns/1ps
module tb_fovit_rs232_relay;
  import fovit_pkg::*;

  localparam realtime T_PCM  = 9 * 54.2535;   // 2.048 MHz
  localparam realtime T_LINE = 8 * 54.2535;   // 2.304 MHz
  localparam int      NBYTES = 24;            // per phase and direction

  logic        reset_n = 1;
  logic        cs_n [2] = '{1, 1};
  logic        rw   [2] = '{1, 1};
  logic [3:0]  addr [2];
  logic [7:0]  data_i [2], data_o [2];
  logic        data_oe [2], irq_n [2];
  logic [15:0] io_o [2], io_oe [2];
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
      .io_i (16'h0000), .io_o (io_o[u]), .io_oe (io_oe[u]),
      .tx_clk2 (tx_clk2[u]), .vid_tx_data (vid_tx_data[u]), .aud_tx_data (aud_tx_data[u]), .fsx (fsx[u]),
      .tx_iclk (tx_iclk[u]), .las_tdata (las_tdata[u]),
      .rx_iclk (rx_iclk[u]), .las_rdata (las_rdata[u]),
      .rx_clk2 (rx_clk2[u]), .vid_rx_data (vid_rx_data[u]), .aud_rx_data (aud_rx_data[u]), .fsr (fsr[u]),
      .clk_1 (clk_1[u]), .clk_2 (clk_2[u]), .clk_3 (clk_3[u]), .clk_4 (clk_4[u])
    );
  end

  // Clocks: each line clock at 9/8 of its unit's PCM clock; each receive PLL
  // output at the far end's PCM rate.
  initial begin #3;   forever #(T_PCM / 2)  tx_clk2[0] = ~tx_clk2[0]; end
  initial begin #3;   forever #(T_LINE / 2) tx_iclk[0] = ~tx_iclk[0]; end
  initial begin #131; forever #(T_PCM / 2)  tx_clk2[1] = ~tx_clk2[1]; end
  initial begin #131; forever #(T_LINE / 2) tx_iclk[1] = ~tx_iclk[1]; end
  initial begin #77;  forever #(T_PCM / 2)  rx_clk2[1] = ~rx_clk2[1]; end
  initial begin #190; forever #(T_PCM / 2)  rx_clk2[0] = ~rx_clk2[0]; end

  // Fibres.
  assign rx_iclk[1]   = tx_iclk[0];
  assign rx_iclk[0]   = tx_iclk[1];
  assign las_rdata[1] = las_tdata[0];
  assign las_rdata[0] = las_tdata[1];

  // Random video and voice traffic alongside the relay.
  for (genvar u = 0; u < 2; u++) begin : g_traffic
    always @(negedge tx_clk2[u]) begin
      vid_tx_data[u] <= 1'($urandom);
      aud_tx_data[u] <= 1'($urandom);
    end
  end

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

  // sent[u]: bytes sent by unit u, with the time the word was handed over.
  logic [7:0] sent_byte [2][$];
  realtime    sent_time [2][$];
  int         got_cnt [2] = '{0, 0};
  int         send_done [2] = '{0, 0};
  realtime    max_latency = 0;
  bit         running = 0;

  // One microcontroller per unit: sends on its schedule and services the
  // interrupt in between, as a single bus master.
  for (genvar u = 0; u < 2; u++) begin : g_mcu
    initial begin
      realtime    next_send;
      int         n;
      logic [7:0] b, src, lo, hi;
      logic [6:0] expect_seq;
      wait (running);
      next_send = $realtime + (u * 97us);
      n = 0;
      expect_seq = 0;
      while (n < 2 * NBYTES || got_cnt[u] < 2 * NBYTES) begin
        if (!irq_n[u]) begin
          rd(u, 4'(REG_INT), src);
          if (src[2]) begin
            rd(u, 4'(REG_PROTO_LO), lo);
            rd(u, 4'(REG_PROTO_HI), hi);
            check($sformatf("unit %0d: a word is waiting", u), sent_byte[1-u].size() > 0);
            if (sent_byte[1-u].size() > 0) begin
              realtime lat;
              lat = $realtime - sent_time[1-u].pop_front();
              if (lat > max_latency) max_latency = lat;
              check($sformatf("unit %0d: latency %0t within two frames", u, lat), lat <= 250us);
              check($sformatf("unit %0d: byte %0d value", u, got_cnt[u]), lo == sent_byte[1-u].pop_front());
            end
            check($sformatf("unit %0d: sequence %0d", u, got_cnt[u]), hi == {expect_seq, 1'b0});
            expect_seq++;
            got_cnt[u]++;
          end
        end else if (n < 2 * NBYTES && $realtime >= next_send) begin
          b = 8'($urandom);
          wr(u, 4'(REG_PROTO_LO), b);
          wr(u, 4'(REG_PROTO_HI), {7'(n), 1'b0});
          sent_byte[u].push_back(b);
          sent_time[u].push_back($realtime);
          n++;
          next_send = next_send + ((n < NBYTES) ? 520.833us : 250us);
        end else begin
          #1us;
        end
      end
      send_done[u] = 1;
    end
  end

  initial begin : main
    logic [7:0] st, lo, hi;
    #100 reset_n = 0;
    #1000 reset_n = 1;
    #(30 * 125us);
    for (int u = 0; u < 2; u++) begin
      rd(u, 4'(REG_STATUS_CMD), st);
      check($sformatf("unit %0d aligned before the relay", u), st[0] == 1'b1);
      rd(u, 4'(REG_INT), st);   // clear the alignment interrupt
    end
    running = 1;
    wait (send_done[0] && send_done[1]);
    #(2 * 125us);
    for (int u = 0; u < 2; u++) begin
      check($sformatf("unit %0d received every byte", u), got_cnt[u] == 2 * NBYTES);
      check($sformatf("unit %0d no byte left over", u), sent_byte[1-u].size() == 0);
      rd(u, 4'(REG_STATUS_CMD), st);
      check($sformatf("unit %0d still aligned, no loss", u), st[1:0] == 2'b01);
      wr(u, 4'(REG_CRC_LO), 8'd0);   // end-less cycle: the register shows the running count
      wr(u, 4'(REG_CRC_HI), 8'd0);
    end
    #(3 * 125us);
    for (int u = 0; u < 2; u++) begin
      rd(u, 4'(REG_CRC_LO), lo);
      rd(u, 4'(REG_CRC_HI), hi);
      check($sformatf("unit %0d no CRC errors", u), {hi, lo} == 16'd0);
    end
    $display("relay: %0d bytes each way, longest write-to-interrupt %0t", 2 * NBYTES, max_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #80ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
