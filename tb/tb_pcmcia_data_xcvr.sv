// tb_pcmcia_data_xcvr: data transceiver lane mapping.
// For each direction and each lane combination, random bytes are driven on
// both buses. The expected value of every driven byte is picked by name
// (even byte = card 7:0, odd byte = card 15:8) from the byte-enable table,
// and undriven lanes must have their enable low.
module tb_pcmcia_data_xcvr;
  import pcmcia_pkg::*;

  logic        rd_en, wr_en;
  lanes_t      lanes;
  logic [15:0] datain_i, datain_o, dataout_i, dataout_o;
  logic [1:0]  datain_oe, dataout_oe;
  int          checks = 0, failures = 0;

  pcmcia_data_xcvr dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what);
    failures++;
    $display("FAIL %s rd=%b wr=%b lanes=%b din=%h dout=%h -> host %h/%b card %h/%b",
             what, rd_en, wr_en, lanes, datain_i, dataout_i, datain_o, datain_oe, dataout_o, dataout_oe);
  endtask

  initial begin
    logic [7:0] even_b, odd_b;
    bit lo, od, hi;
    for (int rep = 0; rep < 20; rep++)
      for (int dir = 0; dir < 3; dir++)
        for (int l = 0; l < 8; l++) begin
          {lo, od, hi} = 3'(l);
          lanes = '{mode: MODE_BYTE, lo_en: lo, lo_odd: od, hi_en: hi};
          rd_en = (dir == 1);
          wr_en = (dir == 2);
          datain_i  = 16'($urandom);
          dataout_i = 16'($urandom);
          #1;
          checks++;
          if (dir == 1) begin
            // card -> host
            even_b = dataout_i[7:0];
            odd_b  = dataout_i[15:8];
            if (datain_oe !== {hi, lo} || dataout_oe !== 2'b00) fail("read enables");
            else if (lo && datain_o[7:0] !== (od ? odd_b : even_b)) fail("read low lane");
            else if (hi && datain_o[15:8] !== odd_b) fail("read high lane");
          end else if (dir == 2) begin
            // host -> card: the byte on host 7:0 is the odd byte when lo_odd
            even_b = datain_i[7:0];
            odd_b  = (lo && od) ? datain_i[7:0] : datain_i[15:8];
            if (datain_oe !== 2'b00 ||
                dataout_oe !== {(lo && od) || hi, lo && !od}) fail("write enables");
            else if (dataout_oe[0] && dataout_o[7:0] !== even_b) fail("write even lane");
            else if (dataout_oe[1] && dataout_o[15:8] !== odd_b) fail("write odd lane");
          end else begin
            if (datain_oe !== 2'b00 || dataout_oe !== 2'b00) fail("idle enables");
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
