// tb_pcmcia_addr_decode: address buffer, byte-lane decode and I/O window.
// Two instances: the default one (no window, every address is the card's)
// and one with a 16-byte window at 0300h. Random and edge addresses with
// random card enables are applied. The buffered address must equal the
// input, the hit flag must match the range test 0300h <= A < 0310h, and
// the lanes must match the byte-enable table (listed below by byte name).
module tb_pcmcia_addr_decode;
  import pcmcia_pkg::*;

  logic [25:0] address, add_d, add_w;
  logic [1:0]  ce_n;
  logic        is_io, iois16_n;
  lanes_t      lanes_d, lanes_w;
  logic        hit_d, hit_w;
  int          checks = 0, failures = 0;

  pcmcia_addr_decode u_def (.address(address), .ce_n(ce_n), .is_io(is_io), .iois16_n(iois16_n),
                            .add(add_d), .lanes(lanes_d), .io_hit(hit_d));
  pcmcia_addr_decode #(.IO_BASE(26'h300), .IO_MASK(26'h3FF_FFF0)) u_win (
    .address(address), .ce_n(ce_n), .is_io(is_io), .iois16_n(iois16_n),
    .add(add_w), .lanes(lanes_w), .io_hit(hit_w));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host low lane: "-", "even" or "odd"; host high lane: 1 if the odd byte moves
  function automatic string lo_name(lanes_t l);
    return !l.lo_en ? "-" : (l.lo_odd ? "odd" : "even");
  endfunction

  task automatic apply(logic [25:0] a);
    logic  exp_hit;
    string exp_lo;
    bit    exp_hi;
    address  = a;
    ce_n     = 2'($urandom);
    is_io    = 1'($urandom);
    iois16_n = 1'($urandom);
    #1;
    exp_hit = (a >= 26'h300) && (a < 26'h310);
    case (ce_n)
      2'b11: begin exp_lo = "-";                   exp_hi = 0; end
      2'b10: begin exp_lo = a[0] ? "odd" : "even"; exp_hi = 0; end
      2'b00: begin exp_lo = "even";                exp_hi = !(is_io && iois16_n); end
      default: begin exp_lo = "-";                 exp_hi = 1; end
    endcase
    checks++;
    if (add_d !== a || add_w !== a || hit_d !== 1'b1 || hit_w !== exp_hit ||
        lanes_d !== lanes_w || lo_name(lanes_d) != exp_lo || lanes_d.hi_en !== exp_hi) begin
      failures++;
      $display("FAIL a=%h ce_n=%b add=%h/%h hit=%b/%b exp_hit=%b lo=%s exp %s hi=%b exp %b",
               a, ce_n, add_d, add_w, hit_d, hit_w, exp_hit, lo_name(lanes_d), exp_lo,
               lanes_d.hi_en, exp_hi);
    end
  endtask

  initial begin
    int hits = 0;
    apply(26'h2FF); apply(26'h300); apply(26'h30F); apply(26'h310);
    apply(26'h1300); apply(26'h0); apply(26'h3FF_FFFF);
    for (int i = 0; i < 2000; i++) begin
      if (i % 4 == 0) apply(26'h300 + 26'($urandom_range(0, 15)));
      else            apply(26'($urandom));
      hits += int'(hit_w);
    end
    checks++;
    if (hits < 400) begin
      failures++;
      $display("FAIL window hit only %0d times", hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
