// async_fifo: dual-clock FIFO used as a rate-adaptation buffer between the
// 2.048 Mbit/s PCM side and the 2.304 Mbit/s optical line side of the FOVIT
// ASIC (one each for transmit video, transmit audio, receive video and
// receive audio).
//
// Storage is a DEPTH x WIDTH array written in the wr_clk domain and read in
// the rd_clk domain. Read and write pointers are one bit wider than the
// address and cross between the domains in Gray code through two flip-flops,
// so full and empty are exact in their own domain and conservative in the
// other one. The read side is first-word-fall-through: rd_data shows the
// oldest word whenever empty is low and rd_en pops it on the next rd_clk edge.
// A write when full or a read when empty is ignored and raises the sticky
// flag wr_overflow or rd_underflow until that side's reset. wr_level and
// rd_level give the fill level as each side sees it.
// The source names the buffers and their purpose; their depth, width and
// construction are this design's choices.
module async_fifo #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 64     // power of two
) (
  // write side
  input  logic                     wr_clk,
  input  logic                     wr_rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   wr_level,
  output logic                     wr_overflow,
  // read side
  input  logic                     rd_clk,
  input  logic                     rd_rst_n,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   rd_level,
  output logic                     rd_underflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  initial begin
    assert (DEPTH >= 4 && (1 << AW) == DEPTH)
      else $error("async_fifo: DEPTH must be a power of two of at least 4");
  end

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wptr_bin, wptr_gray, rptr_bin, rptr_gray;
  logic [AW:0] wptr_gray_rs, rptr_gray_ws;   // synchronised into the other domain
  logic [AW:0] wptr_gray_m,  rptr_gray_m;
  logic [AW:0] wptr_bin_rs,  rptr_bin_ws;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic do_write;
  assign rptr_bin_ws = gray2bin(rptr_gray_ws);
  assign wr_level    = wptr_bin - rptr_bin_ws;
  assign full        = (wr_level == (AW+1)'(DEPTH));
  assign do_write    = wr_en && !full;

  always_ff @(posedge wr_clk) begin
    if (do_write) mem[wptr_bin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wptr_bin     <= '0;
      wptr_gray    <= '0;
      rptr_gray_m  <= '0;
      rptr_gray_ws <= '0;
      wr_overflow  <= 1'b0;
    end else begin
      rptr_gray_m  <= rptr_gray;
      rptr_gray_ws <= rptr_gray_m;
      if (do_write) begin
        wptr_bin  <= wptr_bin + 1'b1;
        wptr_gray <= bin2gray(wptr_bin + 1'b1);
      end
      if (wr_en && full) wr_overflow <= 1'b1;
    end
  end

  // ---------------- read domain ----------------
  logic do_read;
  assign wptr_bin_rs = gray2bin(wptr_gray_rs);
  assign rd_level    = wptr_bin_rs - rptr_bin;
  assign empty       = (rd_level == '0);
  assign do_read     = rd_en && !empty;
  assign rd_data     = mem[rptr_bin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rptr_bin     <= '0;
      rptr_gray    <= '0;
      wptr_gray_m  <= '0;
      wptr_gray_rs <= '0;
      rd_underflow <= 1'b0;
    end else begin
      wptr_gray_m  <= wptr_gray;
      wptr_gray_rs <= wptr_gray_m;
      if (do_read) begin
        rptr_bin  <= rptr_bin + 1'b1;
        rptr_gray <= bin2gray(rptr_bin + 1'b1);
      end
      if (rd_en && empty) rd_underflow <= 1'b1;
    end
  end

endmodule
