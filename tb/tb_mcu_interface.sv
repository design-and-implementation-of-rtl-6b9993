// tb_mcu_interface: self-checking testbench for mcu_interface.
// Runs asynchronous bus cycles (CS low for 200 ns, write data taken at the CS
// rising edge, read data sampled while CS is low) and checks every register of
// the map against values kept here: reset values, command reset bit, status
// bit layout, interrupt mask and IRQ level, clear-on-read hand-off of the
// interrupt source register (bits hidden until the clear is acknowledged),
// CRC reset cycle and error count with its byte
// latch, GPIO direction/output/input, and the protocol registers (one toggle
// per 16-bit word, received word with its byte latch). Also checks that DATA
// is driven only during a read.
`timescale 1ns/1ps
module tb_mcu_interface;
  import fovit_pkg::*;

  logic rst_n = 1, cs_n = 1, rw = 1;
  logic [3:0] addr = '0;
  logic [7:0] data_i = '0, data_o;
  logic data_oe, irq_n;
  logic [15:0] io_i = '0, io_o, io_oe;
  logic soft_reset;
  logic [15:0] cycle_len;
  logic [15:0] tx_proto_word;
  logic tx_proto_tgl, clr_tgl;
  logic clr_ack = 0;   // the line-domain acknowledge, driven by hand here
  irq_vec_t clr_mask, irq_flags = '0;
  logic [15:0] crc_err_count = '0, rx_proto_word = '0;
  logic in_sync = 0, crc_over_thr = 0, tx_slip = 0, rx_slip = 0, fifo_overflow = 0;
  int checks = 0, failures = 0;

  mcu_interface dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic wr(input logic [3:0] a, input logic [7:0] d);
    addr = a; data_i = d; rw = 0;
    #20 cs_n = 0;
    #200 cs_n = 1;
    #50 rw = 1;
  endtask

  task automatic rd(input logic [3:0] a, output logic [7:0] d);
    addr = a; rw = 1;
    #20 cs_n = 0;
    #100 d = data_o;
    check("DATA driven during read", data_oe, 1);
    #100 cs_n = 1;
    #50;
  endtask

  task automatic rd_check(input string what, input logic [3:0] a, input logic [7:0] exp);
    logic [7:0] d;
    rd(a, d);
    check(what, d, exp);
  endtask

  initial begin
    logic [7:0] d;
    logic t0;
    #10 rst_n = 0;
    #100 rst_n = 1;
    #100;
    check("reset: cycle_len 8000", cycle_len, 16'd8000);
    check("reset: no soft reset", soft_reset, 0);
    check("reset: GPIO all inputs", io_oe, 16'h0000);
    check("DATA not driven when idle", data_oe, 0);
    // Status layout.
    in_sync = 1; crc_over_thr = 1; rx_slip = 1;
    rd_check("status", 4'h0, 8'b0001_0101);
    in_sync = 0; crc_over_thr = 0; rx_slip = 0; tx_slip = 1; fifo_overflow = 1;
    rd_check("status 2", 4'h0, 8'b0010_1010);
    tx_slip = 0; fifo_overflow = 0;
    // Command register reset bit.
    wr(4'h0, 8'h01);
    check("soft reset set", soft_reset, 1);
    rd_check("status shows reset", 4'h0, 8'b1000_0010);
    wr(4'h0, 8'h00);
    check("soft reset released", soft_reset, 0);
    // Interrupts: IRQ follows unmasked flags.
    check("IRQ idle", irq_n, 1);
    irq_flags = '{sync: 1'b0, proto_rx: 1'b1, crc_thr: 1'b0, lfa: 1'b1};
    #10 check("IRQ active", irq_n, 0);
    wr(4'h1, 8'h05);                          // mask LFA and protocol
    check("IRQ masked", irq_n, 1);
    wr(4'h1, 8'h04);                          // mask protocol only
    check("IRQ from LFA", irq_n, 0);
    t0 = clr_tgl;
    rd_check("interrupt source", 4'h1, 8'h05);
    check("clear handed off", clr_tgl, !t0);
    check("clear mask is value read", clr_mask, 4'h5);
    // Until the acknowledge comes back the bits being cleared are hidden and
    // a second read starts no new clear.
    check("IRQ released while clear in flight", irq_n, 1);
    rd_check("cleared bits hidden while in flight", 4'h1, 8'h00);
    check("no second clear while in flight", clr_tgl, !t0);
    irq_flags.sync = 1'b1;
    #10 check("new source shows while in flight", irq_n, 0);
    rd_check("new source readable while in flight", 4'h1, 8'h08);
    check("still no second clear", clr_tgl, !t0);
    clr_ack = clr_tgl;
    irq_flags = '0;
    #10 check("IRQ after acknowledge", irq_n, 1);
    #10 check("IRQ released", irq_n, 1);
    wr(4'h1, 8'h00);
    // CRC reset cycle and error count.
    wr(4'h2, 8'h34); wr(4'h3, 8'h12);
    check("CRC reset cycle", cycle_len, 16'h1234);
    crc_err_count = 16'hABCD;
    rd_check("CRC errors low", 4'h2, 8'hCD);
    crc_err_count = 16'h0102;
    rd_check("CRC errors high latched", 4'h3, 8'hAB);
    // GPIO.
    wr(4'h5, 8'hF0); wr(4'h6, 8'h0F);
    check("GPIO direction", io_oe, 16'h0FF0);
    wr(4'h7, 8'hA5); wr(4'h8, 8'h5A);
    check("GPIO outputs", io_o, 16'h5AA5);
    rd_check("DDR A", 4'h5, 8'hF0);
    rd_check("DDR B", 4'h6, 8'h0F);
    io_i = 16'h3C3C;
    rd_check("IO A mixes pins and latch", 4'h7, (8'hA5 & 8'hF0) | (8'h3C & 8'h0F));
    rd_check("IO B mixes pins and latch", 4'h8, (8'h5A & 8'h0F) | (8'h3C & 8'hF0));
    // Protocol registers.
    t0 = tx_proto_tgl;
    wr(4'h9, 8'h77);
    check("no toggle on low byte", tx_proto_tgl, t0);
    wr(4'hA, 8'h66);
    check("toggle on high byte", tx_proto_tgl, !t0);
    check("transmit protocol word", tx_proto_word, 16'h6677);
    rx_proto_word = 16'hC0DE;
    rd_check("received protocol low", 4'h9, 8'hDE);
    rx_proto_word = 16'h1111;
    rd_check("received protocol high latched", 4'hA, 8'hC0);
    rd_check("unused address 4 reads 0", 4'h4, 8'h00);
    // RESET pin clears the bank.
    rst_n = 0; #50 rst_n = 1;
    check("reset clears GPIO direction", io_oe, 16'h0000);
    check("reset restores cycle_len", cycle_len, 16'd8000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
