// tb_wallace_tree: self-checking test of the carry-save reduction tree. It
// drives random and all-ones rows into the default tree (9 rows of 32 bits)
// and into a 5-row, 16-bit and a 3-row, 12-bit tree, and checks that
// sum + carry equals the sum of the rows modulo 2^W, the sum being computed
// here with ordinary integer addition. Watchdog included.
module tb_wallace_tree;
  logic [31:0] r9 [9];
  logic [31:0] s9, c9;
  logic [15:0] r5 [5];
  logic [15:0] s5, c5;
  logic [11:0] r3 [3];
  logic [11:0] s3, c3;
  int checks = 0, failures = 0;

  wallace_tree dut9 (.rows(r9), .sum(s9), .carry(c9));
  wallace_tree #(.ROWS(5), .W(16)) dut5 (.rows(r5), .sum(s5), .carry(c5));
  wallace_tree #(.ROWS(3), .W(12)) dut3 (.rows(r3), .sum(s3), .carry(c3));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] e9;
      logic [15:0] e5;
      logic [11:0] e3;
      e9 = '0; e5 = '0; e3 = '0;
      foreach (r9[k]) begin r9[k] = (i == 0) ? '1 : $urandom; e9 += r9[k]; end
      foreach (r5[k]) begin r5[k] = (i == 0) ? '1 : 16'($urandom); e5 += r5[k]; end
      foreach (r3[k]) begin r3[k] = (i == 0) ? '1 : 12'($urandom); e3 += r3[k]; end
      #1;
      checks += 3;
      if (32'(s9 + c9) !== e9) begin failures++; $display("FAIL 9-row: %h + %h != %h", s9, c9, e9); end
      if (16'(s5 + c5) !== e5) begin failures++; $display("FAIL 5-row: %h + %h != %h", s5, c5, e5); end
      if (12'(s3 + c3) !== e3) begin failures++; $display("FAIL 3-row: %h + %h != %h", s3, c3, e3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
