// tb_cla_adder: self-checking test of the carry look-ahead adder at its
// default 32 bits and at 8 bits (padded internally). Corner operands that
// make a carry run through every group and block (all ones plus one,
// alternating patterns) come first, then random ones; the reference is
// ordinary integer addition modulo 2^W. Watchdog included.
module tb_cla_adder;
  logic [31:0] a, b, s;
  logic [7:0]  a8, b8, s8;
  int checks = 0, failures = 0;

  cla_adder dut (.a(a), .b(b), .s(s));
  cla_adder #(.W(8)) dut8 (.a(a8), .b(b8), .s(s8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] av, logic [31:0] bv);
    a = av; b = bv; a8 = av[7:0]; b8 = bv[7:0];
    #1;
    checks += 2;
    if (s !== 32'(av + bv)) begin failures++; $display("FAIL %h + %h = %h", av, bv, s); end
    if (s8 !== 8'(av[7:0] + bv[7:0])) begin failures++; $display("FAIL8 %h + %h = %h", av[7:0], bv[7:0], s8); end
  endtask

  initial begin
    check(32'hffff_ffff, 32'h1);
    check(32'h0000_ffff, 32'h1);
    check(32'h0000_fff0, 32'h10);
    check(32'haaaa_aaaa, 32'h5555_5556);
    check(32'h8000_0000, 32'h8000_0000);
    check('0, '0);
    for (int i = 0; i < 20000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
