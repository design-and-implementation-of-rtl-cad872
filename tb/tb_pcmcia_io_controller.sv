// tb_pcmcia_io_controller: end-to-end test of the I/O card controller.
//
// The testbench plays the PC Card host. Behind the controller sit a model
// I/O device (32 registers at 0300h, the lower 16 bytes 16-bit wide, the
// upper 16 bytes 8-bit wide) and a model attribute memory (64 bytes). The
// controller is built with a 32-byte I/O window at 0300h so that address
// misses can be tested.
//
// Every transfer is checked against reference copies of both memories:
// the expected byte lanes come from the PC Card byte-enable table (byte,
// word, high-byte-only, standby), INPACK#, AOE#, AWE# and CS# are compared
// with what the transaction should produce, and no data bus lane may be
// driven by two sources. A run of directed transfers is followed by random
// ones. At the end each mechanism (four transaction types, each access
// mode, 8-bit-register word split, I/O inhibit by REG#, address miss,
// illegal double strobe) must have occurred at least once, and both
// memories must equal their reference copies.
module tb_pcmcia_io_controller;
  import pcmcia_pkg::*;

  localparam logic [25:0] IO_BASE = 26'h300;

  // socket side
  logic [25:0] address;
  logic [1:0]  ce_n;
  logic        reg_n, oe_n, we_n, iord_n, iowr_n, inpack_n;
  logic [15:0] datain_i, datain_o;
  logic [1:0]  datain_oe;
  // card side
  logic [25:0] add;
  logic        aoe_n, awe_n, cs_n, iois16_n;
  logic [15:0] dataout_i, dataout_o;
  logic [1:0]  dataout_oe;
  // slaves
  logic [15:0] dev_d, mem_d;
  logic        dev_en, mem_en;

  int checks = 0, failures = 0;

  pcmcia_io_controller #(.IO_BASE(IO_BASE), .IO_MASK(26'h3FF_FFE0)) dut (.*);

  pcmcia_io_device_model #(.WIN_BASE(IO_BASE)) u_dev (
    .add(add), .iord_n(iord_n), .iowr_n(iowr_n), .bus_i(dataout_i), .bus_we(dataout_oe),
    .drive_o(dev_d), .drive_en(dev_en), .iois16_n(iois16_n));

  pcmcia_attr_mem_model u_mem (
    .add(add), .cs_n(cs_n), .aoe_n(aoe_n), .awe_n(awe_n), .bus_i(dataout_i), .bus_we(dataout_oe),
    .drive_o(mem_d), .drive_en(mem_en));

  // card data bus: per lane, whichever source drives it
  for (genvar l = 0; l < 2; l++) begin : g_bus
    assign dataout_i[l*8 +: 8] = dataout_oe[l] ? dataout_o[l*8 +: 8] :
                                 dev_en        ? dev_d[l*8 +: 8]     :
                                 mem_en        ? mem_d[l*8 +: 8]     : 8'h00;
  end

  // bus contention is an error at any time
  int contention = 0;
  always @(dataout_oe, dev_en, mem_en)
    if ((|dataout_oe && (dev_en || mem_en)) || (dev_en && mem_en)) contention++;

  // ---------------------------------------------------------------------
  // reference model
  logic [7:0] ref_io [32];
  logic [7:0] ref_attr [64];

  typedef enum int {
    M_IO_RD, M_IO_WR, M_ATTR_RD, M_ATTR_WR, M_BYTE_EVEN, M_BYTE_ODD, M_WORD16,
    M_WORD8_SPLIT, M_HIGH_ONLY, M_STANDBY, M_INHIBIT, M_MISS, M_ILLEGAL, M_NUM
  } mech_t;
  int mech [M_NUM];

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: a=%h ce_n=%b din_o=%h/%b dout_o=%h/%b inpack_n=%b aoe_n=%b awe_n=%b cs_n=%b",
               what, $time, address, ce_n, datain_o, datain_oe, dataout_o, dataout_oe,
               inpack_n, aoe_n, awe_n, cs_n);
    end
  endtask

  task automatic idle_bus();
    reg_n = 1; oe_n = 1; we_n = 1; iord_n = 1; iowr_n = 1; ce_n = 2'b11;
  endtask

  // kind: 0 I/O read, 1 I/O write, 2 attribute read, 3 attribute write
  // inhibit: REG# stays high. illegal: a second strobe is asserted too.
  task automatic transfer(int kind, logic [25:0] a, logic [1:0] ce, logic [15:0] wdata,
                          bit inhibit = 0, bit illegal = 0);
    bit         io   = kind < 2;
    bit         wr   = kind[0];
    bit         hit  = !io || (a >= IO_BASE && a < IO_BASE + 32);
    bit         w16  = !io || (hit && !a[4]);
    bit         act  = !inhibit && !illegal && hit;
    int         lo   = 0;  // 0 none, 1 even, 2 odd
    bit         hi   = 0;
    int         base;
    logic [7:0] ev, od;

    case (ce)
      2'b10: lo = a[0] ? 2 : 1;
      2'b00: begin lo = 1; hi = w16; end
      2'b01: hi = 1;
      default: ;
    endcase
    if (io) base = int'(a[4:0]) & 30; else base = int'(a[5:0]) & 62;
    ev = io ? ref_io[base[4:0]] : ref_attr[base[5:0]];
    od = io ? ref_io[base[4:0] | 1] : ref_attr[base[5:0] | 1];

    // address phase
    address  = a;
    ce_n     = ce;
    reg_n    = inhibit;
    datain_i = wdata;
    #10;
    // strobe
    case (kind)
      0: iord_n = 0;
      1: iowr_n = 0;
      2: oe_n = 0;
      default: we_n = 0;
    endcase
    if (illegal) begin
      if (kind < 2) oe_n = 0; else iord_n = 0;
    end
    #20;
    // checks during the strobe
    check(add == a, "address buffer");
    if (!act || ce == 2'b11) begin
      check(datain_oe == 2'b00 && dataout_oe == 2'b00, "no data driven");
      check(inpack_n && aoe_n && awe_n && cs_n, "strobes idle");
    end else if (!wr) begin
      check(datain_oe == {hi, lo != 0}, "read lane enables");
      if (lo != 0) check(datain_o[7:0] == (lo == 2 ? od : ev), "read low lane");
      if (hi)      check(datain_o[15:8] == od, "read high lane");
      check(inpack_n == !io, "INPACK#");
      check(aoe_n == io && awe_n && cs_n == io, "attribute strobes on read");
    end else begin
      check(datain_oe == 2'b00, "host bus not driven on write");
      check(inpack_n, "INPACK# idle on write");
      check(awe_n == io && aoe_n && cs_n == io, "attribute strobes on write");
    end
    // reference update for writes
    if (act && wr) begin
      if (io) begin
        if (lo == 1) ref_io[base[4:0]]     = wdata[7:0];
        if (lo == 2) ref_io[base[4:0] | 1] = wdata[7:0];
        if (hi)      ref_io[base[4:0] | 1] = wdata[15:8];
      end else begin
        if (lo == 1) ref_attr[base[5:0]]     = wdata[7:0];
        if (lo == 2) ref_attr[base[5:0] | 1] = wdata[7:0];
        if (hi)      ref_attr[base[5:0] | 1] = wdata[15:8];
      end
    end
    // mechanism counts
    if (inhibit) mech[M_INHIBIT]++;
    else if (illegal) mech[M_ILLEGAL]++;
    else if (!hit) mech[M_MISS]++;
    else begin
      if (ce == 2'b11) mech[M_STANDBY]++;
      else mech[mech_t'(kind)]++;
      if (ce == 2'b10) mech[a[0] ? M_BYTE_ODD : M_BYTE_EVEN]++;
      if (ce == 2'b00) mech[w16 ? M_WORD16 : M_WORD8_SPLIT]++;
      if (ce == 2'b01) mech[M_HIGH_ONLY]++;
    end
    // release: strobes first, address and data held 10 ns longer
    oe_n = 1; we_n = 1; iord_n = 1; iowr_n = 1;
    #10;
    idle_bus();
    #10;
  endtask

  initial begin
    foreach (mech[i]) mech[i] = 0;
    foreach (ref_io[i]) ref_io[i] = 8'(i * 7 + 3);
    foreach (ref_attr[i]) ref_attr[i] = 8'(255 - i * 3);
    idle_bus();
    address = '0;
    datain_i = '0;
    #20;

    // directed transfers, one of each kind
    transfer(1, IO_BASE + 26'h07, 2'b00, 16'h38AE);  // word write, 16-bit register
    transfer(0, IO_BASE + 26'h07, 2'b00, 16'h0000);  // read it back
    transfer(0, IO_BASE + 26'h03, 2'b10, 16'h0000);  // byte read, odd byte
    transfer(0, IO_BASE + 26'h02, 2'b10, 16'h0000);  // byte read, even byte
    transfer(1, IO_BASE + 26'h13, 2'b10, 16'h5A77);  // byte write, odd, 8-bit register
    transfer(1, IO_BASE + 26'h14, 2'b00, 16'hC3D4);  // word write to 8-bit register
    transfer(0, IO_BASE + 26'h14, 2'b00, 16'h0000);
    transfer(1, IO_BASE + 26'h09, 2'b01, 16'h9911);  // high byte only
    transfer(2, 26'h02, 2'b10, 16'h0000);            // attribute read
    transfer(3, 26'h0C, 2'b10, 16'hABCD);            // attribute write
    transfer(2, 26'h0C, 2'b10, 16'h0000);
    transfer(0, IO_BASE + 26'h05, 2'b11, 16'h0000);  // standby
    transfer(0, IO_BASE + 26'h05, 2'b10, 16'h0000, 1'b1);  // REG# high: inhibit
    transfer(0, 26'h1234, 2'b10, 16'h0000);          // outside the I/O window
    transfer(1, IO_BASE + 26'h04, 2'b00, 16'h1111, 1'b0, 1'b1);  // IOWR# and OE#

    // random transfers
    for (int n = 0; n < 3000; n++) begin
      automatic int kind = $urandom_range(0, 3);
      logic [25:0] a;
      if (kind < 2) a = ($urandom_range(0, 9) == 0) ? 26'($urandom) : IO_BASE + 26'($urandom_range(0, 31));
      else          a = 26'($urandom_range(0, 63));
      transfer(kind, a, 2'($urandom), 16'($urandom),
               $urandom_range(0, 19) == 0, $urandom_range(0, 19) == 0);
    end

    // final memory contents
    foreach (ref_io[i])   check(u_dev.mem[i] == ref_io[i], $sformatf("I/O register %0d", i));
    foreach (ref_attr[i]) check(u_mem.mem[i] == ref_attr[i], $sformatf("attribute byte %0d", i));
    check(contention == 0, "data bus contention");
    for (int i = 0; i < M_NUM; i++) begin
      automatic mech_t m = mech_t'(i);
      $display("mechanism %-14s %0d", m.name(), mech[i]);
      check(mech[i] > 0, {"mechanism never seen: ", m.name()});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
