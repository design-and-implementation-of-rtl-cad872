// pcmcia_pkg: types shared by the PCMCIA I/O card controller.
//
// trans_t names the four card transactions of the PC Card bus for an I/O
// card (I/O read/write, attribute memory read/write) plus "none", which
// covers idle, inhibited and illegal strobe combinations.
//
// lanes_t describes one transfer on the 16-bit data path in byte lanes.
// The card side is a fixed 16-bit bus: bits 7:0 hold the even byte and
// bits 15:8 the odd byte. The host side may carry the odd byte on its low
// lane (byte access with A0 = 1), hence the lo_odd flag. The lane rules
// follow the PC Card byte-enable tables; the packing into a struct is this
// design's own.
package pcmcia_pkg;

  typedef enum logic [2:0] {
    TR_NONE       = 3'd0,
    TR_IO_READ    = 3'd1,
    TR_IO_WRITE   = 3'd2,
    TR_ATTR_READ  = 3'd3,
    TR_ATTR_WRITE = 3'd4
  } trans_t;

  // Access modes of the byte-enable tables.
  typedef enum logic [1:0] {
    MODE_STANDBY   = 2'd0,  // CE2# = CE1# = H
    MODE_BYTE      = 2'd1,  // CE2# = H, CE1# = L: one byte on the low lane
    MODE_WORD      = 2'd2,  // CE2# = CE1# = L: both lanes
    MODE_HIGH_ONLY = 2'd3   // CE2# = L, CE1# = H: odd byte on the high lane
  } mode_t;

  typedef struct packed {
    mode_t mode;
    logic  lo_en;   // host lane 7:0 carries a byte
    logic  lo_odd;  // ... and that byte is the odd byte (card lane 15:8)
    logic  hi_en;   // host lane 15:8 carries the odd byte
  } lanes_t;

  // The transaction addresses the I/O device rather than the attribute memory.
  function automatic logic io_trans(trans_t t);
    return t == TR_IO_READ || t == TR_IO_WRITE;
  endfunction

endpackage
