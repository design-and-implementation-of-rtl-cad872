// tb_pcmcia_cmd_decode: exhaustive check of the command decoder.
// All 32 combinations of REG#, OE#, WE#, IORD#, IOWR# are applied. The
// expected transaction is worked out by counting active strobes: REG# must
// be low and exactly one strobe low, and that strobe names the transaction.
module tb_pcmcia_cmd_decode;
  import pcmcia_pkg::*;

  logic   reg_n, oe_n, we_n, iord_n, iowr_n;
  trans_t trans, exp_t;
  int     checks = 0, failures = 0;

  pcmcia_cmd_decode dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen[5];
    foreach (seen[i]) seen[i] = 0;
    for (int v = 0; v < 32; v++) begin
      {reg_n, oe_n, we_n, iord_n, iowr_n} = 5'(v);
      #1;
      exp_t = TR_NONE;
      if (!reg_n && (int'(!oe_n) + int'(!we_n) + int'(!iord_n) + int'(!iowr_n)) == 1) begin
        if (!iord_n)      exp_t = TR_IO_READ;
        else if (!iowr_n) exp_t = TR_IO_WRITE;
        else if (!oe_n)   exp_t = TR_ATTR_READ;
        else              exp_t = TR_ATTR_WRITE;
      end
      checks++;
      if (trans !== exp_t) begin
        failures++;
        $display("FAIL code=%05b got %s expected %s", v[4:0], trans.name(), exp_t.name());
      end
      seen[int'(trans)]++;
    end
    // each of the four transactions decodes from exactly one code
    for (int i = 1; i < 5; i++) begin
      checks++;
      if (seen[i] != 1) begin
        failures++;
        $display("FAIL transaction %0d decoded %0d times", i, seen[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
