// pcmcia_addr_decode: address buffer and address decoder of the controller.
//
// The host address A25:A0 is buffered unchanged onto the card's address
// bus ADD25:ADD0, which feeds both the I/O device and the attribute memory.
// The decoder then works out what the address selects:
//  * the byte lanes of the transfer, from CE#[1:0], A0 and IOIS16#
//    (pcmcia_lane_sel: standby, byte, word, high-byte-only);
//  * io_hit, whether the address lies in the card's I/O window: every bit
//    selected by IO_MASK must equal the same bit of IO_BASE. The card
//    acknowledges and serves an I/O access only on a hit.
//
// The 26-bit width is that of the PC Card bus. The window parameters are
// this design's addition; with the default IO_MASK = 0 every I/O address is
// the card's, as for a card that leaves all I/O decoding to its device.
//
// Purely combinational; no clock.
module pcmcia_addr_decode
  import pcmcia_pkg::*;
#(
  parameter int unsigned   AW      = 26,
  parameter logic [AW-1:0] IO_BASE = '0,
  parameter logic [AW-1:0] IO_MASK = '0
) (
  input  logic [AW-1:0] address,
  input  logic [1:0]    ce_n,      // [1] = CE2# (odd byte), [0] = CE1# (even byte)
  input  logic          is_io,     // the transaction is an I/O transaction
  input  logic          iois16_n,  // addressed I/O register is 16 bits when low
  output logic [AW-1:0] add,
  output lanes_t        lanes,
  output logic          io_hit
);

  assign add    = address;
  assign io_hit = ((address ^ IO_BASE) & IO_MASK) == '0;

  pcmcia_lane_sel u_lane (
    .ce_n     (ce_n),
    .a0       (address[0]),
    .is_io    (is_io),
    .iois16_n (iois16_n),
    .lanes    (lanes)
  );

endmodule
