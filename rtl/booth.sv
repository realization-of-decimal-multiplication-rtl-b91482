// booth: radix-16 modified Booth recoder for one five-bit multiplier string.
//
// A radix-16 digit D = -8*y[i+3] + 4*y[i+2] + 2*y[i+1] + y[i] + y[i-1], in
// {-8..+8}, is split into two radix-4 Booth digits that share y[i+1]:
//   lower: grp[2:0] = {y[i+1], y[i], y[i-1]}   selects 0, +-X,  +-2X
//   upper: grp[4:2] = {y[i+3], y[i+2], y[i+1]} selects 0, +-4X, +-8X
// so D*X = lower + upper. Each half is a booth_encoder driving a
// booth_selector. The upper row leaves here unshifted (its weight 4 is
// applied by the adder) and the two rows are summed in the adder's
// carry-save tree rather than by a separate adder, so the two multiples of
// the radix-16 digit never need a carry-propagate adder of their own.
//
// Interface: x[N-1:0] signed multiplicand, grp[4:0] the multiplier string;
// pp_lo/pp_hi are N+1-bit one's complement rows and neg_lo/neg_hi the +1 bits
// that complete them. Purely combinational.
module booth
  import booth_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic [N-1:0] x,
  input  logic [4:0]   grp,
  output logic [N:0]   pp_lo,
  output logic [N:0]   pp_hi,
  output logic         neg_lo,
  output logic         neg_hi
);

  booth_ctrl_t ctrl_lo, ctrl_hi;

  booth_encoder u_be_lo (.grp(grp[2:0]), .ctrl(ctrl_lo));
  booth_encoder u_be_hi (.grp(grp[4:2]), .ctrl(ctrl_hi));

  booth_selector #(.N(N)) u_bs_lo (.x(x), .ctrl(ctrl_lo), .pp(pp_lo));
  booth_selector #(.N(N)) u_bs_hi (.x(x), .ctrl(ctrl_hi), .pp(pp_hi));

  assign neg_lo = ctrl_lo.neg;
  assign neg_hi = ctrl_hi.neg;

endmodule
