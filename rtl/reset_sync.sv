// reset_sync: reset bridge for one clock domain. The output reset is asserted
// asynchronously with arst_n and released synchronously, two edges of clk
// after arst_n rises, so that no flip-flop of the domain leaves reset on a
// different edge than its neighbours.
module reset_sync (
  input  logic clk,
  input  logic arst_n,   // asynchronous, active low
  output logic rst_n     // active low, released in step with clk
);

  logic stage;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      stage <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      stage <= 1'b1;
      rst_n <= stage;
    end
  end

endmodule
