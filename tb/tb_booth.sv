// tb_booth: self-checking test of the radix-16 Booth recoder. For all 32
// five-bit strings and random and corner multiplicands it checks that
// (pp_lo + neg_lo) + 4*(pp_hi + neg_hi) equals D*x with
// D = -8*g4 + 4*g3 + 2*g2 + g1 + g0, and that each half on its own is one of
// 0, +-x, +-2x. It also checks the reference vector x = 100 with the lowest
// string of y = 25 ({y3..y0, 0} = 10010): lower row +x = 100, upper row the
// one's complement of 2x (17'h1ff37) with its negation bit set.
module tb_booth;
  localparam int unsigned N = 16;

  logic [N-1:0] x;
  logic [4:0]   grp;
  logic [N:0]   pp_lo, pp_hi;
  logic         neg_lo, neg_hi;
  int checks = 0, failures = 0;

  booth #(.N(N)) dut (.x(x), .grp(grp), .pp_lo(pp_lo), .pp_hi(pp_hi),
                      .neg_lo(neg_lo), .neg_hi(neg_hi));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] xv, logic [4:0] gv);
    longint xs, d, dlo, dhi, lo, hi;
    x   = xv;
    grp = gv;
    #1;
    xs  = longint'($signed(xv));
    d   = -8 * longint'(gv[4]) + 4 * longint'(gv[3]) + 2 * longint'(gv[2])
          + longint'(gv[1]) + longint'(gv[0]);
    dlo = -2 * longint'(gv[2]) + longint'(gv[1]) + longint'(gv[0]);
    dhi = -2 * longint'(gv[4]) + longint'(gv[3]) + longint'(gv[2]);
    lo  = longint'($signed(pp_lo)) + longint'(neg_lo);
    hi  = longint'($signed(pp_hi)) + longint'(neg_hi);
    checks++;
    if (lo + 4 * hi !== d * xs || lo !== dlo * xs || hi !== dhi * xs) begin
      failures++;
      $display("FAIL x=%0d grp=%b lo=%0d hi=%0d D=%0d", xs, gv, lo, hi, d);
    end
  endtask

  initial begin
    // reference vector
    x = 16'd100; grp = 5'b10010;
    #1;
    checks++;
    if (pp_lo !== 17'd100 || pp_hi !== 17'h1ff37 || neg_lo !== 1'b0 || neg_hi !== 1'b1) begin
      failures++;
      $display("FAIL reference vector: pp_lo=%h pp_hi=%h neg=%b%b", pp_lo, pp_hi, neg_hi, neg_lo);
    end
    for (int g = 0; g < 32; g++) begin
      check('0, 5'(g));
      check(16'h7fff, 5'(g));
      check(16'h8000, 5'(g));
      check(16'hffff, 5'(g));
      for (int i = 0; i < 100; i++) check(N'($urandom), 5'(g));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
