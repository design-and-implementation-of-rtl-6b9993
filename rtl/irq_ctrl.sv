// irq_ctrl: interrupt source flags of the FOVIT ASIC, held in the receive
// line clock domain (RX_ICLK), where all four sources arise.
//
// Each source event sets its sticky flag. The microcontroller clears flags by
// reading the interrupt source register: its interface then holds the value it
// read stable on clr_mask and toggles clr_tgl. The toggle is synchronised
// here and, when it changes, exactly the flags in clr_mask are cleared, so an
// event that arrives after the read is kept. An event in the same clock as
// the clear is kept. clr_ack follows the toggle in the clock in
// which the clear takes effect, so the interface can tell a clear still in
// flight. Masking and the IRQ pin are in the microcontroller
// interface. The four sources follow the source document's IRQ pin
// description; clear-on-read and the crossing are this design's choices.
module irq_ctrl
  import fovit_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  irq_vec_t events,     // one-clock pulses
  input  irq_vec_t clr_mask,   // stable while clr_tgl is in flight
  input  logic     clr_tgl,
  output irq_vec_t flags,
  output logic     clr_ack     // equals clr_tgl once its clear is applied
);

  logic tgl_s, tgl_seen;

  sync_2ff u_sync (.clk(clk), .rst_n(rst_n), .d(clr_tgl), .q(tgl_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags    <= '0;
      tgl_seen <= 1'b0;
    end else begin
      tgl_seen <= tgl_s;
      if (tgl_s != tgl_seen) flags <= (flags & ~clr_mask) | events;
      else                   flags <= flags | events;
    end
  end

  assign clr_ack = tgl_seen;

endmodule
