// clk_divider: divides a clock by DIV to give the 16 kHz reference and
// feedback signals of an external phase-locked loop.
//
// A counter runs from 0 to DIV-1; the output is a registered square wave, low
// for the first DIV/2 input periods and high for the rest (for an odd DIV the
// high part is one period longer). The FOVIT ASIC uses DIV = 128 on the
// 2.048 MHz clocks and DIV = 144 on the 2.304 MHz line clocks, so that both
// outputs are 16 kHz and an external 74HC4046 phase comparator can lock the
// line clock to 9/8 of the PCM clock. The division ratios follow the source;
// the duty cycle and the reset state are this design's choices.
module clk_divider #(
  parameter int unsigned DIV = 128
) (
  input  logic clk,
  input  logic rst_n,    // asynchronous, active low
  output logic clk_div
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_div <= 1'b0;
    end else begin
      cnt     <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      // Output is high while the next count is in the upper half.
      clk_div <= ((cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1) >= CW'(DIV / 2);
    end
  end

endmodule
