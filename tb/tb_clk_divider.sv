// tb_clk_divider: self-checking testbench for clk_divider at the two ratios
// the ASIC uses, 128 (2.048 MHz -> 16 kHz) and 144 (2.304 MHz -> 16 kHz).
// Counts input clocks between output rising edges and the high time of the
// output, and checks both 16 kHz outputs have the same period when the input
// clocks are at 2.048 and 2.304 MHz.
`timescale 1ns/1ps
module tb_clk_divider;
  logic clk_a = 1'b0, clk_b = 1'b0, rst_n = 1'b0;
  logic div_a, div_b;
  int checks = 0, failures = 0;

  clk_divider #(.DIV(128)) dut_a (.clk(clk_a), .rst_n(rst_n), .clk_div(div_a));
  clk_divider #(.DIV(144)) dut_b (.clk(clk_b), .rst_n(rst_n), .clk_div(div_b));

  // 2.048 MHz and 2.304 MHz in an exact 9:8 ratio (half periods 244.140625 / 217.013889 ns).
  always #(244.140625) clk_a = ~clk_a;
  always #(217.0138888) clk_b = ~clk_b;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_int(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    realtime ta0, ta1, tb0, tb1;
    int na, nb, ha, hb;
    bit prev;
    #1us rst_n = 1'b1;
    // divider A
    @(posedge div_a);
    for (int n = 0; n < 3; n++) begin
      na = 0; ha = 0; prev = 1'b1;
      forever begin
        @(posedge clk_a); #1;
        na++;
        if (div_a) ha++;
        if (div_a && !prev) break;
        prev = div_a;
      end
      check_int("div128 period", na, 128);
      check_int("div128 high", ha, 64);
    end
    @(posedge div_b);
    for (int n = 0; n < 3; n++) begin
      nb = 0; hb = 0; prev = 1'b1;
      forever begin
        @(posedge clk_b); #1;
        nb++;
        if (div_b) hb++;
        if (div_b && !prev) break;
        prev = div_b;
      end
      check_int("div144 period", nb, 144);
      check_int("div144 high", hb, 72);
    end
    // Both 16 kHz outputs have a 62.5 us period.
    @(posedge div_a); ta0 = $realtime; @(posedge div_a); ta1 = $realtime;
    @(posedge div_b); tb0 = $realtime; @(posedge div_b); tb1 = $realtime;
    // 62.5 us within the 1 ps rounding of the simulated clock half periods.
    check_int("16 kHz period A within 2 ns", longint'(((ta1 - ta0) / 1ns - 62500.0) ** 2 < 4.0), 1);
    check_int("16 kHz period B within 2 ns", longint'(((tb1 - tb0) / 1ns - 62500.0) ** 2 < 4.0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
