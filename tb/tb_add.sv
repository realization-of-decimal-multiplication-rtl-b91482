// tb_add: self-checking test of the partial-product adder block at its
// default size (8 rows of 17 bits, 32-bit result). Rows and negation bits
// are random; the expected result is the sum over k of
// (signed row k + neg k) * 4^k modulo 2^32, computed here with integers.
// The reference rows of a 100 x 25 product are checked as well (2500).
module tb_add;
  localparam int unsigned N = 16;
  localparam int unsigned NPP = 8;

  logic [N:0]     pp [NPP];
  logic [NPP-1:0] neg;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  add dut (.pp(pp), .neg(neg), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint e;
    e = 0;
    #1;
    for (int k = 0; k < NPP; k++)
      e += (longint'($signed(pp[k])) + longint'(neg[k])) * (longint'(1) << (2 * k));
    checks++;
    if (p !== 32'(e)) begin
      failures++;
      $display("FAIL p=%h exp=%h", p, 32'(e));
    end
  endtask

  initial begin
    // rows of 100 * 25: +x, -2x (one's complement + neg), +2x, zeros
    foreach (pp[k]) pp[k] = '0;
    pp[0] = 17'd100; pp[1] = 17'h1ff37; pp[2] = 17'd200;
    neg = 8'b0000_0010;
    check();
    checks++;
    if (p !== 32'd2500) begin failures++; $display("FAIL reference p=%0d", p); end
    for (int i = 0; i < 20000; i++) begin
      foreach (pp[k]) pp[k] = 17'($urandom);
      neg = 8'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
