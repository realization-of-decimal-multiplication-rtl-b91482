// tb_booth_selector: self-checking test of the Booth selector. For random
// and corner multiplicands and every control word it checks that the row plus
// its negation bit equals d*x as an (N+1)-bit two's complement number, with
// d = -2..+2 (and -0 for neg with no magnitude). Watchdog included.
module tb_booth_selector;
  import booth_pkg::*;

  localparam int unsigned N = 16;

  logic [N-1:0] x;
  booth_ctrl_t  ctrl;
  logic [N:0]   pp;
  int checks = 0, failures = 0;

  booth_selector #(.N(N)) dut (.x(x), .ctrl(ctrl), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [N-1:0] xv);
    // {neg, one, two} words that an encoder can produce
    logic [2:0] words [6] = '{3'b000, 3'b010, 3'b001, 3'b110, 3'b101, 3'b100};
    foreach (words[w]) begin
      longint d, expv, got;
      x    = xv;
      ctrl = booth_ctrl_t'(words[w]);
      #1;
      d    = (ctrl.one ? 1 : (ctrl.two ? 2 : 0)) * (ctrl.neg ? -1 : 1);
      expv = d * longint'($signed(xv));
      got  = longint'($signed(pp)) + longint'(ctrl.neg);
      checks++;
      if (got !== expv) begin
        failures++;
        $display("FAIL x=%0d ctrl=%b pp=%h got=%0d exp=%0d", $signed(xv), ctrl, pp, got, expv);
      end
    end
  endtask

  initial begin
    check_one('0);
    check_one(16'h7fff);
    check_one(16'h8000);
    check_one(16'hffff);
    check_one(16'd100);
    for (int i = 0; i < 2000; i++) check_one(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
