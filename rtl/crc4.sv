// crc4: serial CRC-4 register, generator polynomial x^4 + x + 1.
//
// One message bit per clock enters at din while en is high; the register holds
// the remainder of the bits seen since the last clear (initial value 0, no
// final inversion). The transmitter feeds it the frame bits it sends and then
// sends crc[3] first; the receiver feeds it the bits it receives and compares.
// clear has priority over en and takes effect on the next clock edge.
// The polynomial follows the source's "CRC-4"; the serial form, the zero
// initial value and the reset are this design's choices.
module crc4
  import fovit_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,   // asynchronous, active low
  input  logic       clear,   // synchronous clear to 0
  input  logic       en,      // shift in din
  input  logic       din,
  output logic [3:0] crc
);

  logic fb;
  assign fb = crc[3] ^ din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      crc <= '0;
    else if (clear)  crc <= '0;
    else if (en)     crc <= {crc[2:0], 1'b0} ^ (fb ? CRC4_POLY : 4'b0000);
  end

endmodule
