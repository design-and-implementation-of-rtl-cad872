// pcmcia_io_controller: controller of a PC Card (PCMCIA) Type II I/O card.
//
// Sits between the PC Card socket and the card's two slaves, an I/O device
// and the attribute memory that holds the card information structure. It
// buffers the address (ADD = Address), decodes the command strobes into one
// of four transactions (I/O read/write, attribute memory read/write),
// steers the byte lanes from CE#[1:0], A0 and IOIS16#, generates the
// attribute memory strobes AOE#, AWE#, CS# and the INPACK# acknowledge, and
// moves data through a bidirectional 16-bit transceiver.
//
//   strobes -> pcmcia_cmd_decode -> trans
//   address, ce_n, iois16_n -> pcmcia_addr_decode (with pcmcia_lane_sel)
//                                -> add, lanes, io_hit
//   trans, lanes, io_hit -> pcmcia_ctrl_logic -> strobes, rd_en, wr_en
//   rd_en, wr_en, lanes -> pcmcia_data_xcvr <-> datain / dataout
//
// The controller has no clock: every output is a combinational function
// of the inputs, so a transfer lasts exactly as long as the host holds its
// strobe. IOIS16# is taken from the I/O device (it tells whether the
// addressed register is 16 bits wide) and is the same wire the socket sees.
// IORD#/IOWR# reach the I/O device directly from the socket. Bidirectional
// buses are split into input, output and per-byte output enable; the pad
// buffers are outside this RTL. All signal names ending in _n are active low.
module pcmcia_io_controller
  import pcmcia_pkg::*;
#(
  parameter int unsigned   AW      = 26,
  parameter logic [AW-1:0] IO_BASE = '0,
  parameter logic [AW-1:0] IO_MASK = '0
) (
  // PC Card socket side
  input  logic [AW-1:0] address,
  input  logic [1:0]    ce_n,       // [1] = CE2# (odd byte), [0] = CE1# (even byte)
  input  logic          reg_n,
  input  logic          oe_n,
  input  logic          we_n,
  input  logic          iord_n,
  input  logic          iowr_n,
  output logic          inpack_n,
  input  logic [15:0]   datain_i,
  output logic [15:0]   datain_o,
  output logic [1:0]    datain_oe,
  // card side
  output logic [AW-1:0] add,
  output logic          aoe_n,
  output logic          awe_n,
  output logic          cs_n,
  input  logic          iois16_n,
  input  logic [15:0]   dataout_i,
  output logic [15:0]   dataout_o,
  output logic [1:0]    dataout_oe
);

  trans_t trans;
  lanes_t lanes;
  logic   io_hit;
  logic   rd_en, wr_en;

  pcmcia_addr_decode #(.AW(AW), .IO_BASE(IO_BASE), .IO_MASK(IO_MASK)) u_addr (
    .address  (address),
    .ce_n     (ce_n),
    .is_io    (io_trans(trans)),
    .iois16_n (iois16_n),
    .add      (add),
    .lanes    (lanes),
    .io_hit   (io_hit)
  );

  pcmcia_cmd_decode u_cmd (
    .reg_n  (reg_n),
    .oe_n   (oe_n),
    .we_n   (we_n),
    .iord_n (iord_n),
    .iowr_n (iowr_n),
    .trans  (trans)
  );

  pcmcia_ctrl_logic u_ctrl (
    .trans    (trans),
    .lanes    (lanes),
    .io_hit   (io_hit),
    .aoe_n    (aoe_n),
    .awe_n    (awe_n),
    .cs_n     (cs_n),
    .inpack_n (inpack_n),
    .rd_en    (rd_en),
    .wr_en    (wr_en)
  );

  pcmcia_data_xcvr u_xcvr (
    .rd_en      (rd_en),
    .wr_en      (wr_en),
    .lanes      (lanes),
    .datain_i   (datain_i),
    .datain_o   (datain_o),
    .datain_oe  (datain_oe),
    .dataout_i  (dataout_i),
    .dataout_o  (dataout_o),
    .dataout_oe (dataout_oe)
  );

endmodule
