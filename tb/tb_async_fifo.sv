// tb_async_fifo: self-checking testbench for async_fifo.
// Write and read clocks at 2.048 and 2.304 MHz. Phase 1: random writes and
// reads with a reference queue; every word read must be the oldest one
// written, full must mean DEPTH words are stored and the FIFO must never be
// written when full. Phase 2: reads stop until the FIFO is full and one more
// write sets wr_overflow. Phase 3: writes stop, the FIFO drains and one more
// read sets rd_underflow. Also checks the fill levels and that a word written
// becomes visible on the read side within a few read clocks.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int W = 8, D = 16;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty, wr_overflow, rd_underflow;
  logic [$clog2(D):0] wr_level, rd_level;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #244.140 wr_clk = ~wr_clk;
  always #217.014 rd_clk = ~rd_clk;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  bit phase_random = 1;
  int wr_prob = 50, rd_prob = 50;

  // writer
  always @(posedge wr_clk) begin
    if (wr_rst_n) begin
      if (wr_en && !full) q.push_back(wr_data);
      if (phase_random) begin
        wr_en   <= ($urandom % 100) < wr_prob;
        wr_data <= W'($urandom);
      end
    end
  end

  // reader
  always @(posedge rd_clk) begin
    if (rd_rst_n) begin
      if (rd_en && !empty) begin
        check("read data order", q.size() > 0 && rd_data == q[0]);
        if (q.size() > 0) void'(q.pop_front());
      end
      if (phase_random) rd_en <= ($urandom % 100) < rd_prob;
    end
  end

  // full means exactly D stored words (the write side sees every read late)
  always @(negedge wr_clk) if (wr_rst_n) begin
    check("never more than DEPTH words stored", q.size() <= D);
    if (full) check("full implies nearly DEPTH words", q.size() >= D - 3);
    check("wr_level within range", wr_level <= D);
  end
  always @(negedge rd_clk) if (rd_rst_n) begin
    check("rd_level not above stored words", rd_level <= q.size());
  end

  initial begin
    #1us; wr_rst_n = 1; rd_rst_n = 1;
    // Phase 1: random traffic, three mixes.
    wr_prob = 50; rd_prob = 50; #2ms;
    wr_prob = 90; rd_prob = 30; #2ms;
    wr_prob = 20; rd_prob = 90; #2ms;
    // Phase 2: reset, then fill up.
    phase_random = 0;
    @(posedge rd_clk) rd_en <= 0;
    @(posedge wr_clk) wr_en <= 0;
    #1us wr_rst_n = 0; rd_rst_n = 0; q = {};
    #1us wr_rst_n = 1; rd_rst_n = 1;
    check("flags clear after reset", !wr_overflow && !rd_underflow && empty && !full);
    @(posedge wr_clk) wr_en <= 1;
    repeat (D + 8) @(posedge wr_clk);
    #1 check("full after filling", full);
    check("wr_level = DEPTH", wr_level == D);
    check("overflow flagged", wr_overflow);
    @(posedge wr_clk) wr_en <= 0;
    repeat (4) @(posedge rd_clk);
    #1 check("rd_level = DEPTH", rd_level == D);
    check("no underflow yet", !rd_underflow);
    // Phase 3: drain.
    @(posedge rd_clk) rd_en <= 1;
    repeat (D + 4) @(posedge rd_clk);
    #1 check("empty after draining", empty);
    check("underflow flagged", rd_underflow);
    check("reference queue empty", q.size() == 0);
    @(posedge rd_clk) rd_en <= 0;
    // Latency: one word becomes visible within 4 read clocks.
    @(posedge wr_clk) begin wr_en <= 1; wr_data <= 8'hA5; end
    @(posedge wr_clk) wr_en <= 0;
    repeat (4) @(posedge rd_clk);
    #1 check("word visible after crossing", !empty && rd_data == 8'hA5);
    // Reset clears the sticky flags.
    wr_rst_n = 0; rd_rst_n = 0; q = {};
    #1us;
    check("flags cleared by reset", !wr_overflow && !rd_underflow && empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
