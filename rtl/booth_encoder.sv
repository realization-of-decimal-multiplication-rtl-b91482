// booth_encoder: radix-4 modified Booth encoder (BE).
//
// Looks at one overlapping three-bit group of the multiplier,
// grp = {y[i+1], y[i], y[i-1]}, and returns the Booth digit
// d = -2*y[i+1] + y[i] + y[i-1] in {-2,-1,0,+1,+2} as the control word
// {neg, one, two} of booth_pkg::booth_ctrl_t:
//   one = y[i] ^ y[i-1]
//   two = (grp == 3'b100) | (grp == 3'b011)
//   neg = y[i+1]
// neg is the group's top bit even for grp = 3'b111 (d = -0); the selector then
// produces all ones and the added neg bit turns that back into zero. This
// matches the reference waveform, where each row's correction bit is simply
// the odd multiplier bit y1, y3, ..., y15.
//
// Purely combinational; no clock.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]  grp,   // {y[i+1], y[i], y[i-1]}
  output booth_ctrl_t ctrl
);

  always_comb begin
    ctrl.neg = grp[2];
    ctrl.one = grp[1] ^ grp[0];
    ctrl.two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
  end

endmodule
