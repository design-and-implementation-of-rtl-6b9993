// mcu_interface: asynchronous microcontroller interface and register bank of
// the FOVIT ASIC, with the interrupt request and 16 general purpose I/O pins.
//
// The bus has no clock: chip select CS (active low), RW (1 = read, 0 = write),
// a 4-bit address and an 8-bit data bus. A write is taken on the rising edge
// of CS, which is the only clock of this block. During a read the addressed
// register drives data_o and data_oe is high while CS is low and RW is high
// (data_o/data_oe model the bidirectional DATA pins). Register map:
//   0  read  STATUS     [0] frame alignment held, [1] loss of frame alignment,
//                       [2] CRC errors over threshold in this cycle,
//                       [3] transmit FIFO slip, [4] receive FIFO slip,
//                       [5] FIFO overflow, [7] command reset active
//      write COMMAND    [0] 1 = hold transmitter and receiver in reset
//   1  read  INT SOURCE [0] LFA, [1] CRC threshold, [2] protocol received,
//                       [3] frame alignment recovered; reading clears the
//                       bits read (through irq_ctrl). Until that clear has
//                       reached the line clock domain (clr_ack equal to
//                       clr_tgl, about three RX_ICLK periods) those bits read
//                       as 0 and do not drive irq_n, and a further read
//                       clears nothing; flags it shows stay set for the next.
//      write INT MASK   [3:0] 1 = source disabled
//   2  read  CRC errors [7:0]; also latches [15:8] for the next read of 3
//      write CRC reset cycle [7:0] (frames per measurement cycle)
//   3  read  CRC errors [15:8] as latched;  write CRC reset cycle [15:8]
//   5,6      direction of IODATA[7:0] / [15:8], 1 = output
//   7,8      write: output latch of IODATA[7:0] / [15:8]; read: pin level
//            for inputs, latch for outputs
//   9  write transmit protocol [7:0] (staged)
//      read  received protocol [7:0]; also latches [15:8] for the next read of A
//   A  write transmit protocol [15:8]; the whole 16-bit word is then handed
//            to the transmitter (proto_tgl toggles)
//      read  received protocol [15:8] as latched
// irq_n is low while any unmasked interrupt flag is set (the open-drain pin
// is outside this model). The register addresses, their read/write pairing,
// the 16 I/O pins and the four interrupt sources follow the source; the bit
// layout of status, command and interrupt registers, the byte latching and
// the reset values (all zero, CRC reset cycle 8000 frames) are this design's
// choices. Values from the line domains (status, error count, received word)
// are read as they stand; they are registers that change at most once per
// 125 us frame, and the two 16-bit ones are read through byte latches.
module mcu_interface
  import fovit_pkg::*;
(
  input  logic                  rst_n,        // RESET pin, asynchronous, active low
  // microcontroller bus
  input  logic                  cs_n,
  input  logic                  rw,
  input  logic [3:0]            addr,
  input  logic [7:0]            data_i,
  output logic [7:0]            data_o,
  output logic                  data_oe,
  output logic                  irq_n,
  // general purpose I/O
  input  logic [15:0]           io_i,
  output logic [15:0]           io_o,
  output logic [15:0]           io_oe,
  // to the core
  output logic                  soft_reset,
  output logic [15:0]           cycle_len,
  output logic [PROTO_BITS-1:0] tx_proto_word,
  output logic                  tx_proto_tgl,
  output irq_vec_t              clr_mask,
  output logic                  clr_tgl,
  // from the core
  input  irq_vec_t              irq_flags,
  input  logic                  clr_ack,      // equals clr_tgl once the clear is applied
  input  logic [15:0]           crc_err_count,
  input  logic [PROTO_BITS-1:0] rx_proto_word,
  input  logic                  in_sync,
  input  logic                  crc_over_thr,
  input  logic                  tx_slip,
  input  logic                  rx_slip,
  input  logic                  fifo_overflow
);

  logic       cmd_reset;
  irq_vec_t   int_mask;
  logic [7:0] ddr_a, ddr_b, out_a, out_b;
  logic [7:0] proto_lo_stage, crc_hi_hold, proto_hi_hold;
  logic [7:0] status;
  logic       clr_busy;
  irq_vec_t   int_seen;

  assign soft_reset = cmd_reset;
  assign io_o       = {out_b, out_a};
  assign io_oe      = {ddr_b, ddr_a};
  // Flags whose clear is still crossing into the line clock domain are
  // hidden, so a quick second look does not report them again.
  assign clr_busy   = clr_tgl ^ clr_ack;
  assign int_seen   = irq_flags & ~(clr_busy ? clr_mask : irq_vec_t'('0));
  assign irq_n      = ~|(int_seen & ~int_mask);

  assign status = {cmd_reset, 1'b0, fifo_overflow, rx_slip, tx_slip, crc_over_thr,
                   ~in_sync, in_sync};

  // ---------------- writes and read side effects, on the CS rising edge ----------------
  always_ff @(posedge cs_n or negedge rst_n) begin
    if (!rst_n) begin
      cmd_reset      <= 1'b0;
      int_mask       <= '0;
      cycle_len      <= 16'd8000;
      ddr_a          <= '0;
      ddr_b          <= '0;
      out_a          <= '0;
      out_b          <= '0;
      proto_lo_stage <= '0;
      tx_proto_word  <= '0;
      tx_proto_tgl   <= 1'b0;
      clr_mask       <= '0;
      clr_tgl        <= 1'b0;
      crc_hi_hold    <= '0;
      proto_hi_hold  <= '0;
    end else if (!rw) begin
      case (addr)
        REG_STATUS_CMD: cmd_reset         <= data_i[0];
        REG_INT:        int_mask          <= data_i[3:0];
        REG_CRC_LO:     cycle_len[7:0]    <= data_i;
        REG_CRC_HI:     cycle_len[15:8]   <= data_i;
        REG_DDR_A:      ddr_a             <= data_i;
        REG_DDR_B:      ddr_b             <= data_i;
        REG_IO_A:       out_a             <= data_i;
        REG_IO_B:       out_b             <= data_i;
        REG_PROTO_LO:   proto_lo_stage    <= data_i;
        REG_PROTO_HI: begin
          tx_proto_word <= {data_i, proto_lo_stage};
          tx_proto_tgl  <= ~tx_proto_tgl;
        end
        default: ;
      endcase
    end else begin
      case (addr)
        REG_INT: if (!clr_busy) begin
          clr_mask <= int_seen;           // the value the microcontroller just read
          clr_tgl  <= ~clr_tgl;
        end
        REG_CRC_LO:   crc_hi_hold   <= crc_err_count[15:8];
        REG_PROTO_LO: proto_hi_hold <= rx_proto_word[15:8];
        default: ;
      endcase
    end
  end

  // ---------------- read multiplexer ----------------
  always_comb begin
    unique case (addr)
      REG_STATUS_CMD: data_o = status;
      REG_INT:        data_o = {4'b0000, int_seen};
      REG_CRC_LO:     data_o = crc_err_count[7:0];
      REG_CRC_HI:     data_o = crc_hi_hold;
      REG_DDR_A:      data_o = ddr_a;
      REG_DDR_B:      data_o = ddr_b;
      REG_IO_A:       data_o = (ddr_a & out_a) | (~ddr_a & io_i[7:0]);
      REG_IO_B:       data_o = (ddr_b & out_b) | (~ddr_b & io_i[15:8]);
      REG_PROTO_LO:   data_o = rx_proto_word[7:0];
      REG_PROTO_HI:   data_o = proto_hi_hold;
      default:        data_o = 8'h00;
    endcase
  end

  assign data_oe = !cs_n && rw;

endmodule
