// pcmcia_ctrl_logic: strobes and acknowledge of the I/O card controller.
//
// From the decoded transaction, the lane selection and the I/O address hit
// it drives (all outputs active low except the two enables):
//   AOE#     attribute memory output enable, during an attribute read
//   AWE#     attribute memory write enable, during an attribute write
//   CS#      attribute memory chip select, during either attribute access
//   INPACK#  input acknowledge to the host, during an I/O read whose
//            address the card recognises
//   rd_en    the data transceiver drives the host bus (card -> host)
//   wr_en    the data transceiver drives the card bus (host -> card)
// Every output requires that at least one byte lane moves, so standby
// (both CE# high) and illegal enable codes leave the card idle.
//
// What the strobes mean follows the PC Card signal list. Gating the I/O
// data path, and not only INPACK#, with the address hit, and asserting CS#
// only together with OE# or WE#, are this design's choices.
//
// Purely combinational; no clock.
module pcmcia_ctrl_logic
  import pcmcia_pkg::*;
(
  input  trans_t trans,
  input  lanes_t lanes,
  input  logic   io_hit,
  output logic   aoe_n,
  output logic   awe_n,
  output logic   cs_n,
  output logic   inpack_n,
  output logic   rd_en,
  output logic   wr_en
);

  logic moves;
  logic attr_rd, attr_wr, io_rd, io_wr;

  always_comb begin
    moves   = lanes.lo_en || lanes.hi_en;
    attr_rd = moves && trans == TR_ATTR_READ;
    attr_wr = moves && trans == TR_ATTR_WRITE;
    io_rd   = moves && io_hit && trans == TR_IO_READ;
    io_wr   = moves && io_hit && trans == TR_IO_WRITE;

    aoe_n    = !attr_rd;
    awe_n    = !attr_wr;
    cs_n     = !(attr_rd || attr_wr);
    inpack_n = !io_rd;
    rd_en    = attr_rd || io_rd;
    wr_en    = attr_wr || io_wr;
  end

  // A transfer has one direction only.
  always_comb assert (!(rd_en && wr_en)) else $error("read and write enabled together");

endmodule
