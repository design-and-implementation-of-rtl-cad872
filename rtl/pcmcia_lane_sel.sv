// pcmcia_lane_sel: byte-lane steering of the PC Card 16-bit data path.
//
// From the card enables CE2# (ce_n[1], odd byte) and CE1# (ce_n[0], even
// byte) and address bit A0 it selects the access mode and the byte lanes
// that move:
//
//   CE2# CE1# A0   mode        host D15:8   host D7:0
//    H    H   x    standby     -            -
//    H    L   L    byte        -            even byte
//    H    L   H    byte        -            odd byte
//    L    L   x    word        odd byte     even byte
//    L    H   x    high only   odd byte     -
//
// The table holds for I/O and for attribute memory transfers alike.
// Choices of this design where the tables are silent:
//  * The tables list the word access with A0 = L only. A word access with
//    A0 = H is treated as a word access too (A0 ignored, both lanes move),
//    as in the worked word write at the odd address 0A7h.
//  * For an I/O word access to an 8-bit register (the I/O device leaves
//    IOIS16# high) only the even byte moves; the host is expected to split
//    the access into two byte accesses, as it must for an 8-bit port.
//    IOIS16# has no effect on byte, high-only or attribute accesses.
//
// Purely combinational; no clock.
module pcmcia_lane_sel
  import pcmcia_pkg::*;
(
  input  logic [1:0] ce_n,
  input  logic       a0,
  input  logic       is_io,
  input  logic       iois16_n,
  output lanes_t     lanes
);

  always_comb begin
    lanes = '{mode: MODE_STANDBY, lo_en: 1'b0, lo_odd: 1'b0, hi_en: 1'b0};
    unique case (ce_n)
      2'b11: lanes.mode = MODE_STANDBY;
      2'b10: begin
        lanes.mode   = MODE_BYTE;
        lanes.lo_en  = 1'b1;
        lanes.lo_odd = a0;
      end
      2'b00: begin
        lanes.mode  = MODE_WORD;
        lanes.lo_en = 1'b1;
        // 8-bit I/O register: only the even byte is transferred.
        lanes.hi_en = !(is_io && iois16_n);
      end
      2'b01: begin
        lanes.mode  = MODE_HIGH_ONLY;
        lanes.hi_en = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
