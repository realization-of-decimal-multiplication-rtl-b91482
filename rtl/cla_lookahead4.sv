// cla_lookahead4: four-bit carry look-ahead unit.
//
// From the generate and propagate signals of four positions and the carry
// into the lowest one it forms, in two gate levels, the carry into each
// position (c[0] = cin) and the group generate gg and propagate pg that a
// higher look-ahead level uses. The same unit serves both levels of
// cla_adder. Combinational.
module cla_lookahead4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic [3:0] c,
  output logic       gg,
  output logic       pg
);

  always_comb begin
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    pg   = &p;
  end

endmodule
