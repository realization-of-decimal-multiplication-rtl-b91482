// tb_boothmultiplier: end-to-end self-checking test of the radix-16 Booth
// multiplier.
//
// The multiplier at its default 16-bit size (no parameter overrides) is
// checked with the reference vector 100 x 25 = 2500 (iop = 8'b11000100), with
// all pairs of signed corner operands and with 200,000 random pairs. Expected
// products come from the simulator's own signed multiplication. Reduced
// widths are covered by tb_boothmultiplier_small.
//
// Mechanism coverage is counted on the 16-bit instance: every radix-16
// digit value -8..+8, every radix-4 selection (0, +-X, +-2X) and the
// negative-zero string (neg set with zero magnitude) must occur; a mechanism
// that never occurs counts as a failure. Watchdog included.
module tb_boothmultiplier;
  logic [15:0] x, y;
  logic [31:0] p;
  logic [7:0]  iop;
  int checks = 0, failures = 0;

  int digit_seen [17];   // radix-16 digit -8..+8 -> index 0..16
  int sel_seen   [6];    // radix-4 selections: 0, +1, +2, -1, -2, -0

  boothmultiplier dut (.x(x), .y(y), .p(p), .iop(iop));

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void count_digits(logic [15:0] yv);
    logic [16:0] ye;
    ye = {yv, 1'b0};
    for (int i = 0; i < 4; i++) begin
      logic [4:0] g;
      int d;
      g = ye[4*i +: 5];
      d = -8 * int'(g[4]) + 4 * int'(g[3]) + 2 * int'(g[2]) + int'(g[1]) + int'(g[0]);
      digit_seen[d + 8]++;
    end
    for (int i = 0; i < 8; i++) begin
      logic [2:0] g;
      g = ye[2*i +: 3];
      case (g)
        3'b000:          sel_seen[0]++;
        3'b001, 3'b010:  sel_seen[1]++;
        3'b011:          sel_seen[2]++;
        3'b101, 3'b110:  sel_seen[3]++;
        3'b100:          sel_seen[4]++;
        default:         sel_seen[5]++;
      endcase
    end
  endfunction

  task automatic check16(logic [15:0] xv, logic [15:0] yv);
    logic [31:0] e;
    x = xv; y = yv;
    #1;
    e = 32'($signed(xv) * $signed(yv));
    count_digits(yv);
    checks++;
    if (p !== e || iop !== e[7:0]) begin
      failures++;
      $display("FAIL %0d * %0d: p=%0d iop=%h exp=%0d", $signed(xv), $signed(yv), $signed(p), iop, $signed(e));
    end
  endtask

  initial begin
    // reference vector
    check16(16'd100, 16'd25);
    checks++;
    if (p !== 32'd2500 || iop !== 8'b1100_0100) begin
      failures++;
      $display("FAIL reference: p=%0d iop=%b", p, iop);
    end

    // signed corners
    begin
      static logic [15:0] c [8] = '{16'h0000, 16'h0001, 16'hffff, 16'h7fff,
                             16'h8000, 16'h8001, 16'h5555, 16'haaaa};
      foreach (c[i]) foreach (c[j]) check16(c[i], c[j]);
    end

    // random
    for (int i = 0; i < 200000; i++) check16(16'($urandom), 16'($urandom));

    // mechanism coverage
    for (int d = 0; d < 17; d++) begin
      if (digit_seen[d] == 0) begin
        failures++;
        $display("FAIL radix-16 digit %0d never occurred", d - 8);
      end
    end
    for (int s = 0; s < 6; s++) begin
      if (sel_seen[s] == 0) begin
        failures++;
        $display("FAIL radix-4 selection class %0d never occurred", s);
      end
    end
    for (int d = 0; d < 17; d++) $display("radix-16 digit %0d occurred %0d times", d - 8, digit_seen[d]);
    for (int s = 0; s < 6; s++) $display("radix-4 selection class %0d (0,+1,+2,-1,-2,-0) occurred %0d times", s, sel_seen[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
