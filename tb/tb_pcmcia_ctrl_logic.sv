// tb_pcmcia_ctrl_logic: exhaustive check of the strobe generator.
// Every transaction, every lane combination and both address-hit values
// are applied. The expected strobes come from the rules: AOE#/AWE# follow
// an attribute read/write, CS# either attribute access, INPACK# a
// recognised I/O read, and nothing happens unless a byte lane moves.
module tb_pcmcia_ctrl_logic;
  import pcmcia_pkg::*;

  trans_t trans;
  lanes_t lanes;
  logic   io_hit;
  logic   aoe_n, awe_n, cs_n, inpack_n, rd_en, wr_en;
  int     checks = 0, failures = 0;

  pcmcia_ctrl_logic dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit any, ar, aw, ir, iw;
    for (int t = 0; t < 5; t++)
      for (int l = 0; l < 32; l++)
        for (int h = 0; h < 2; h++) begin
          trans  = trans_t'(t);
          lanes  = lanes_t'(l);
          io_hit = 1'(h);
          #1;
          any = lanes.lo_en | lanes.hi_en;
          ar  = any && t == 3;
          aw  = any && t == 4;
          ir  = any && t == 1 && h == 1;
          iw  = any && t == 2 && h == 1;
          checks++;
          if (aoe_n !== !ar || awe_n !== !aw || cs_n !== !(ar | aw) ||
              inpack_n !== !ir || rd_en !== (ar | ir) || wr_en !== (aw | iw)) begin
            failures++;
            $display("FAIL t=%0d l=%b h=%0d: aoe_n=%b awe_n=%b cs_n=%b inpack_n=%b rd=%b wr=%b",
                     t, 5'(l), h, aoe_n, awe_n, cs_n, inpack_n, rd_en, wr_en);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
