// pcmcia_cmd_decode: decodes the PC Card command strobes into a transaction.
//
// An I/O card answers four transactions, each selected by REG# low and
// exactly one of the four active-low strobes OE#, WE#, IORD#, IOWR# low:
//
//   REG# OE# WE# IORD# IOWR#   transaction
//    0    1   1    0     1     I/O read
//    0    1   1    1     0     I/O write
//    0    0   1    1     1     attribute memory read
//    0    1   0    1     1     attribute memory write
//
// Any other combination (REG# high, no strobe, or two strobes at once)
// decodes to TR_NONE, so the card neither drives nor writes anything.
// The table is the standard one for I/O cards; treating every other code
// as "no transaction" is this design's choice.
//
// Purely combinational; no clock. Output follows the inputs after gate delay.
module pcmcia_cmd_decode
  import pcmcia_pkg::*;
(
  input  logic   reg_n,
  input  logic   oe_n,
  input  logic   we_n,
  input  logic   iord_n,
  input  logic   iowr_n,
  output trans_t trans
);

  always_comb begin
    unique case ({reg_n, oe_n, we_n, iord_n, iowr_n})
      5'b0_11_01: trans = TR_IO_READ;
      5'b0_11_10: trans = TR_IO_WRITE;
      5'b0_01_11: trans = TR_ATTR_READ;
      5'b0_10_11: trans = TR_ATTR_WRITE;
      default:    trans = TR_NONE;
    endcase
  end

endmodule
