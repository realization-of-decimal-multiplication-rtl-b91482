// tb_booth_encoder: exhaustive self-checking test of the radix-4 Booth
// encoder. For all eight groups {y[i+1], y[i], y[i-1]} the expected digit
// d = -2*y[i+1] + y[i] + y[i-1] is computed here and compared with the
// control word: one = (|d| == 1), two = (|d| == 2), neg = y[i+1]. A
// watchdog ends the run with a failure if it ever hangs.
module tb_booth_encoder;
  import booth_pkg::*;

  logic [2:0]  grp;
  booth_ctrl_t ctrl;
  int checks = 0, failures = 0;

  booth_encoder dut (.grp(grp), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int d, mag;
      grp = 3'(g);
      #1;
      d   = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      mag = d < 0 ? -d : d;
      checks++;
      if (ctrl.one !== (mag == 1) || ctrl.two !== (mag == 2) || ctrl.neg !== grp[2]) begin
        failures++;
        $display("FAIL grp=%b d=%0d ctrl=%b", grp, d, ctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
