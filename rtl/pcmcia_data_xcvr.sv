// pcmcia_data_xcvr: 16-bit bidirectional data transceiver.
//
// Connects the host data bus (Datain, PC Card side) with the card's
// internal data bus (Dataout, I/O device and attribute memory side). The
// card bus is a fixed 16-bit bus: even byte on 7:0, odd byte on 15:8.
//
// Read (rd_en, card -> host):
//   host 7:0  <- card 7:0, or card 15:8 when lanes.lo_odd   (if lanes.lo_en)
//   host 15:8 <- card 15:8                                  (if lanes.hi_en)
// Write (wr_en, host -> card):
//   card 7:0  <- host 7:0                   (if lo_en and not lo_odd)
//   card 15:8 <- host 7:0  (if lo_en and lo_odd), else host 15:8 (if hi_en)
// A lane that does not move is left undriven.
//
// The pads themselves are tri-state buffers outside this RTL: each bus is
// brought out as an input, an output value and one output enable per byte
// lane (bit 0 for 7:0, bit 1 for 15:8); a pad drives its output while its
// enable is 1. The lane map follows the PC Card byte-enable tables; the
// split into _i/_o/_oe signals is this design's choice.
//
// Purely combinational; no clock.
module pcmcia_data_xcvr
  import pcmcia_pkg::*;
(
  input  logic        rd_en,
  input  logic        wr_en,
  input  lanes_t      lanes,
  input  logic [15:0] datain_i,
  output logic [15:0] datain_o,
  output logic [1:0]  datain_oe,
  input  logic [15:0] dataout_i,
  output logic [15:0] dataout_o,
  output logic [1:0]  dataout_oe
);

  logic odd_lo;  // the odd byte travels on the host's low lane
  assign odd_lo = lanes.lo_en && lanes.lo_odd;

  // card -> host
  always_comb begin
    datain_o[7:0]  = lanes.lo_odd ? dataout_i[15:8] : dataout_i[7:0];
    datain_o[15:8] = dataout_i[15:8];
    datain_oe[0]   = rd_en && lanes.lo_en;
    datain_oe[1]   = rd_en && lanes.hi_en;
  end

  // host -> card
  always_comb begin
    dataout_o[7:0]  = datain_i[7:0];
    dataout_o[15:8] = odd_lo ? datain_i[7:0] : datain_i[15:8];
    dataout_oe[0]   = wr_en && lanes.lo_en && !lanes.lo_odd;
    dataout_oe[1]   = wr_en && (odd_lo || lanes.hi_en);
  end

  // The two buses are never driven in the same transfer.
  always_comb assert (!((|datain_oe) && (|dataout_oe)))
    else $error("transceiver drives both buses");

endmodule
