// booth_selector: radix-4 modified Booth selector (BS), the multiplexer that
// generates one partial-product row.
//
// From the signed N-bit multiplicand x it picks 0, X or 2X, each as an N+1-bit
// two's complement value (X is sign-extended by one bit, 2X is x shifted left
// by one), and inverts every bit when ctrl.neg is set. The row is therefore
// d*X - neg: the missing +1 is not added here but passed on to the adder as
// the row's neg bit, so no carry chain sits in the selector.
//
// Interface: x[N-1:0] signed multiplicand, ctrl from booth_encoder,
// pp[N:0] partial-product row. Purely combinational.
module booth_selector
  import booth_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT  // multiplicand width
) (
  input  logic [N-1:0] x,
  input  booth_ctrl_t  ctrl,
  output logic [N:0]   pp
);

  logic [N:0] x1, x2, mag;

  always_comb begin
    x1  = {x[N-1], x};   // +X, sign-extended to N+1 bits
    x2  = {x, 1'b0};     // +2X
    mag = ctrl.one ? x1 : (ctrl.two ? x2 : '0);
    pp  = mag ^ {(N+1){ctrl.neg}};
  end

endmodule
