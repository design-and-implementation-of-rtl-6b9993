// tb_crc4: self-checking testbench for crc4.
// Feeds random messages of random length into the serial CRC register and
// compares the remainder with a reference computed here by long division of
// the message times x^4 by x^4 + x + 1. Also checks clear, the hold when en
// is low, and that appending the remainder gives a zero remainder.
`timescale 1ns/1ps
module tb_crc4;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0, din = 1'b0;
  logic [3:0] crc;
  int checks = 0, failures = 0;

  crc4 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: polynomial long division of M(x)*x^4 by x^4+x+1.
  function automatic logic [3:0] ref_crc(input bit msg[$]);
    bit [4:0] r = '0;
    bit m[$];
    m = msg;
    repeat (4) m.push_back(1'b0);
    foreach (m[i]) begin
      r = {r[3:0], m[i]};
      if (r[4]) r = r ^ 5'b10011;
    end
    return r[3:0];
  endfunction

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    bit msg[$];
    logic [3:0] held;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      int len = 1 + ($urandom % 300);
      msg = {};
      // clear
      clear <= 1'b1; en <= 1'b0;
      @(posedge clk);
      clear <= 1'b0;
      @(posedge clk); #1;
      check("clear", crc, 4'h0);
      for (int i = 0; i < len; i++) begin
        bit b = (t % 3 == 0) ? 1'b1 : 1'($urandom);
        msg.push_back(b);
        en <= 1'b1; din <= b;
        @(posedge clk);
      end
      en <= 1'b0;
      @(posedge clk); #1;
      check($sformatf("crc len %0d", len), crc, ref_crc(msg));
      held = crc;
      din <= ~din;
      repeat (3) @(posedge clk);
      #1 check("hold", crc, held);
      // Appending the remainder leaves remainder zero.
      for (int k = 3; k >= 0; k--) begin
        en <= 1'b1; din <= held[k];
        @(posedge clk);
      end
      en <= 1'b0;
      @(posedge clk); #1;
      check("self-check remainder", crc, 4'h0);
    end
    // Known value: the single bit '1' gives x^4 mod (x^4+x+1) = x+1.
    clear <= 1'b1; @(posedge clk); clear <= 1'b0;
    en <= 1'b1; din <= 1'b1; @(posedge clk); en <= 1'b0;
    @(posedge clk); #1 check("x^4 mod g", crc, 4'b0011);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
