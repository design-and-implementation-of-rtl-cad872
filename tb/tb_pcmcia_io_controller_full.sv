// tb_pcmcia_io_controller_full: the controller at its default parameters
// (26-bit address, no I/O window) taken through the four reference
// transfers of an I/O card, with the card-side bus driven directly:
//   1. I/O write, CE#[1:0] = 00, 16-bit register (IOIS16# low), address
//      0A7h, host data 38AEh       -> card bus 38AEh on both lanes
//   2. I/O read, CE#[1:0] = 10 (byte), address 0A3h (odd), device data
//      ABCDh                       -> host low lane ABh, INPACK# low
//   3. attribute read, CE#[1:0] = 10, address 002h, memory data 00FFh
//                                  -> host low lane FFh, AOE# and CS# low
//   4. attribute write, CE#[1:0] = 10, address 00Ch, host data ABCDh
//                                  -> card low lane CDh, AWE# and CS# low
// Between transfers the card is idle and every output must be inactive.
module tb_pcmcia_io_controller_full;
  logic [25:0] address, add;
  logic [1:0]  ce_n, datain_oe, dataout_oe;
  logic        reg_n, oe_n, we_n, iord_n, iowr_n, inpack_n;
  logic        aoe_n, awe_n, cs_n, iois16_n;
  logic [15:0] datain_i, datain_o, dataout_i, dataout_o;
  int          checks = 0, failures = 0;

  pcmcia_io_controller dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: din_o=%h/%b dout_o=%h/%b inpack_n=%b aoe_n=%b awe_n=%b cs_n=%b",
               what, datain_o, datain_oe, dataout_o, dataout_oe, inpack_n, aoe_n, awe_n, cs_n);
    end
  endtask

  task automatic idle();
    reg_n = 1; oe_n = 1; we_n = 1; iord_n = 1; iowr_n = 1; ce_n = 2'b11; iois16_n = 1;
    #20;
    check(datain_oe == 0 && dataout_oe == 0 && inpack_n && aoe_n && awe_n && cs_n, "idle");
  endtask

  initial begin
    address = '0; datain_i = '0; dataout_i = '0;
    idle();

    // 1. I/O write of a word to a 16-bit register
    address = 26'h00000A7; ce_n = 2'b00; reg_n = 0; iois16_n = 0; datain_i = 16'h38AE;
    #10 iowr_n = 0;
    #30;
    check(add == 26'h00000A7, "address buffer");
    check(dataout_oe == 2'b11 && dataout_o == 16'h38AE, "I/O word write data");
    check(datain_oe == 2'b00 && inpack_n && cs_n, "I/O write strobes");
    iowr_n = 1;
    idle();

    // 2. I/O byte read of the odd byte
    address = 26'h00000A3; ce_n = 2'b10; reg_n = 0; dataout_i = 16'hABCD;
    #10 iord_n = 0;
    #30;
    check(datain_oe == 2'b01 && datain_o[7:0] == 8'hAB, "I/O odd byte read data");
    check(!inpack_n && dataout_oe == 2'b00, "INPACK# on I/O read");
    iord_n = 1;
    idle();

    // 3. attribute memory read
    address = 26'h0000002; ce_n = 2'b10; reg_n = 0; dataout_i = 16'h00FF;
    #10 oe_n = 0;
    #30;
    check(!aoe_n && !cs_n && awe_n && inpack_n, "attribute read strobes");
    check(datain_oe == 2'b01 && datain_o[7:0] == 8'hFF, "attribute read data");
    oe_n = 1;
    idle();

    // 4. attribute memory write
    address = 26'h000000C; ce_n = 2'b10; reg_n = 0; datain_i = 16'hABCD;
    #10 we_n = 0;
    #30;
    check(!awe_n && !cs_n && aoe_n, "attribute write strobes");
    check(dataout_oe == 2'b01 && dataout_o[7:0] == 8'hCD, "attribute write data");
    we_n = 1;
    idle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
