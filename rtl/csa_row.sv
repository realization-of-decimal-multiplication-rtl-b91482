// csa_row: one row of W full adders used as a 3:2 carry-save adder.
//
// a + b + c == s + cy (mod 2^W): s is the bitwise sum, cy the bitwise
// majority shifted left by one place (the carry out of the top bit is
// dropped, as the whole tree works modulo 2^W). Combinational.
module csa_row #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-2:0] maj;  // carry out of the top bit is not kept

  always_comb begin
    s   = a ^ b ^ c;
    maj = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    cy  = {maj, 1'b0};
  end

endmodule
