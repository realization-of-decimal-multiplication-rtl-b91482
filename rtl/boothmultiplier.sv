// boothmultiplier: signed N x N radix-16 modified Booth multiplier.
//
// The multiplier y gets a 0 appended below its LSB and is cut into N/4
// overlapping five-bit strings {y[4i+3..4i], y[4i-1]}. Each string drives one
// radix-16 recoder (booth), which yields the two radix-4 partial-product rows
// whose sum is D_i * x, D_i in {-8..+8}: N/2 rows for N/4 radix-16 digits,
// where a radix-2 array would need N. The add block aligns the rows, adds the
// negation bits, reduces everything with a Wallace tree of carry-save adders
// and finishes with a carry look-ahead adder.
//
// x and y are two's complement; p = x * y is the full 2N-bit signed product.
// iop carries p[7:0], the output port of the reference design's schematic.
// When N is not a multiple of four, y is sign-extended to the next multiple.
//
// The structure (one radix-16 recoder per four multiplier bits, all feeding
// one adder block) and the x, y, iop ports follow the reference design; the
// full-product port p and the sign extension for odd widths are this
// design's additions.
//
// Timing: purely combinational; p is valid one propagation delay after x or
// y changes. There is no clock, reset or handshake.
module boothmultiplier
  import booth_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT  // operand width
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p,
  output logic [7:0]     iop
);

  localparam int unsigned NR  = (N + 3) / 4;  // radix-16 digits
  localparam int unsigned NPP = 2 * NR;       // radix-4 partial-product rows
  localparam int unsigned NY  = 4 * NR;       // multiplier width after extension

  logic [NY:0]    yext;     // {sign extension, y, appended 0}
  logic [N:0]     pp  [NPP];
  logic [NPP-1:0] neg;

  if (NY > N) begin : g_sext
    assign yext = {{(NY - N){y[N-1]}}, y, 1'b0};
  end else begin : g_nosext
    assign yext = {y, 1'b0};
  end

  for (genvar i = 0; i < NR; i++) begin : g_booth
    booth #(.N(N)) u_booth (
      .x     (x),
      .grp   (yext[4*i +: 5]),
      .pp_lo (pp[2*i]),
      .pp_hi (pp[2*i+1]),
      .neg_lo(neg[2*i]),
      .neg_hi(neg[2*i+1])
    );
  end

  add #(.N(N), .NPP(NPP)) u_add (
    .pp (pp),
    .neg(neg),
    .p  (p)
  );

  assign iop = p[7:0];

  initial begin
    assert (N >= 4) else $fatal(1, "boothmultiplier: N must be at least 4");
  end

endmodule
