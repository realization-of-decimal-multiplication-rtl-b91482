// add: partial-product summation of the radix-16 Booth multiplier.
//
// Takes the NPP radix-4 partial-product rows produced by the booth recoders
// (row k has weight 4^k; rows 2i and 2i+1 are the lower and upper halves of
// radix-16 digit i) together with each row's negation bit. Every row is
// sign-extended from N+1 to 2N bits and shifted left by 2k; the negation
// bits, which complete the one's complement rows to two's complement, sit at
// bit 2k and never overlap, so they share one extra row. The NPP+1 rows are
// reduced to two by the Wallace tree, and the carry look-ahead adder adds
// those two into the 2N-bit product.
//
// Sign extension is done by plain replication of each row's top bit; that is
// this design's choice (the constant-correction trick would shorten the tree
// columns but is not needed for correctness).
//
// Interface: pp[k] partial-product row k (N+1 bits), neg[k] its +1 bit,
// p the 2N-bit product modulo 2^(2N). Purely combinational.
module add
  import booth_pkg::*;
#(
  parameter int unsigned N   = N_DEFAULT,
  parameter int unsigned NPP = 2 * ((N + 3) / 4)  // radix-4 rows
) (
  input  logic [N:0]     pp  [NPP],
  input  logic [NPP-1:0] neg,
  output logic [2*N-1:0] p
);

  localparam int unsigned W = 2 * N;

  logic [W-1:0] rows [NPP+1];
  logic [W-1:0] negrow;
  logic [W-1:0] sum, carry;

  for (genvar k = 0; k < NPP; k++) begin : g_row
    logic [W-1:0] ext;
    assign ext     = W'(signed'(pp[k]));
    assign rows[k] = ext << (2 * k);
  end

  always_comb begin
    negrow = '0;
    for (int unsigned k = 0; k < NPP; k++) begin
      if (2 * k < W) negrow[2*k] = neg[k];
    end
  end
  assign rows[NPP] = negrow;

  wallace_tree #(.ROWS(NPP + 1), .W(W)) u_tree (
    .rows (rows),
    .sum  (sum),
    .carry(carry)
  );

  cla_adder #(.W(W)) u_cla (
    .a(sum),
    .b(carry),
    .s(p)
  );

endmodule
