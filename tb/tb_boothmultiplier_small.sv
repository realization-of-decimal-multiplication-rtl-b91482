// tb_boothmultiplier_small: exhaustive self-checking test of the radix-16
// Booth multiplier at reduced widths. An 8-bit instance (two radix-16
// recoders) is checked on all 65,536 operand pairs, and a 6-bit instance,
// whose multiplier is sign-extended to eight bits before recoding, on all
// 4,096 pairs. Expected products come from the simulator's own signed
// multiplication; iop must equal the low byte. Watchdog included.
module tb_boothmultiplier_small;
  logic [7:0]  x8, y8;
  logic [15:0] p8;
  logic [7:0]  iop8;
  logic [5:0]  x6, y6;
  logic [11:0] p6;
  logic [7:0]  iop6;
  int checks = 0, failures = 0;
  int sext_used = 0;

  boothmultiplier #(.N(8)) dut8 (.x(x8), .y(y8), .p(p8), .iop(iop8));
  boothmultiplier #(.N(6)) dut6 (.x(x6), .y(y6), .p(p6), .iop(iop6));

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        logic [15:0] e8;
        logic [11:0] e6;
        x8 = 8'(a); y8 = 8'(b);
        x6 = 6'(a); y6 = 6'(b);
        #1;
        e8 = 16'($signed(x8) * $signed(y8));
        checks++;
        if (p8 !== e8 || iop8 !== e8[7:0]) begin
          failures++;
          $display("FAIL8 %0d * %0d: p=%0d", $signed(x8), $signed(y8), $signed(p8));
        end
        if (a < 64 && b < 64) begin
          e6 = 12'($signed(x6) * $signed(y6));
          if (y6[5]) sext_used++;   // negative multiplier: extension bits are ones
          checks++;
          if (p6 !== e6 || iop6 !== e6[7:0]) begin
            failures++;
            $display("FAIL6 %0d * %0d: p=%0d", $signed(x6), $signed(y6), $signed(p6));
          end
        end
      end
    end
    $display("6-bit products with a sign-extended negative multiplier: %0d", sext_used);
    if (sext_used == 0) begin
      failures++;
      $display("FAIL multiplier sign extension never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
