// tb_pcmcia_lane_sel: exhaustive check of the byte-lane steering.
// Every combination of CE2#, CE1#, A0, I/O-or-memory and IOIS16# is applied
// and compared with the byte-enable table written out row by row below.
module tb_pcmcia_lane_sel;
  import pcmcia_pkg::*;

  logic [1:0] ce_n;
  logic       a0, is_io, iois16_n;
  lanes_t     lanes;
  int         checks = 0, failures = 0;

  pcmcia_lane_sel dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected mode, low lane (0 none, 1 even byte, 2 odd byte), high lane.
  task automatic expect_row(output mode_t m, output int lo, output bit hi);
    casez ({ce_n, a0})
      3'b11?: begin m = MODE_STANDBY;   lo = 0; hi = 0; end
      3'b100: begin m = MODE_BYTE;      lo = 1; hi = 0; end
      3'b101: begin m = MODE_BYTE;      lo = 2; hi = 0; end
      3'b00?: begin m = MODE_WORD;      lo = 1; hi = !(is_io && iois16_n); end
      3'b01?: begin m = MODE_HIGH_ONLY; lo = 0; hi = 1; end
      default: begin m = MODE_STANDBY;  lo = 0; hi = 0; end
    endcase
  endtask

  initial begin
    mode_t m;
    int    lo, got_lo;
    bit    hi;
    for (int v = 0; v < 32; v++) begin
      {ce_n, a0, is_io, iois16_n} = 5'(v);
      #1;
      expect_row(m, lo, hi);
      got_lo = !lanes.lo_en ? 0 : (lanes.lo_odd ? 2 : 1);
      checks++;
      if (lanes.mode != m || got_lo != lo || lanes.hi_en != hi) begin
        failures++;
        $display("FAIL ce_n=%b a0=%b io=%b iois16_n=%b: mode %0d lo %0d hi %0d, expected %0d %0d %0d",
                 ce_n, a0, is_io, iois16_n, lanes.mode, got_lo, lanes.hi_en, m, lo, hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
