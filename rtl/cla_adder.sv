// cla_adder: W-bit carry look-ahead adder, the final carry-propagate adder
// that turns the carry-save tree's two rows into the product.
//
// Two look-ahead levels of cla_lookahead4 units: the first level works on
// four-bit groups of bit generate (a&b) and propagate (a^b) signals, the
// second on four groups at a time, using the first level's group generate
// and propagate. The carry between second-level blocks of 16 bits ripples,
// which for the default 32 bits is a single step. The width is padded
// internally to a multiple of 16; the sum is taken modulo 2^W and the carry
// out is dropped, as the product width already holds every result.
//
// A carry look-ahead adder as the final adder follows the reference design;
// its two-level organisation and block sizes are this design's choice.
//
// Interface: a, b addends; s = a + b. Purely combinational.
module cla_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  localparam int unsigned NB = (W + 15) / 16;  // 16-bit blocks
  localparam int unsigned WP = NB * 16;        // padded width
  localparam int unsigned NG = WP / 4;         // 4-bit groups

  logic [WP-1:0] ap, bp, gb, pb, cb;
  logic [NG-1:0] ggrp, pgrp, cgrp;
  logic [NB-1:0] cblk;
  logic [NB-1:0] gblk, pblk;

  assign ap = WP'(a);
  assign bp = WP'(b);
  assign gb = ap & bp;
  assign pb = ap ^ bp;
  assign cblk[0] = 1'b0;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    cla_lookahead4 u_l2 (
      .g  (ggrp[4*k +: 4]),
      .p  (pgrp[4*k +: 4]),
      .cin(cblk[k]),
      .c  (cgrp[4*k +: 4]),
      .gg (gblk[k]),
      .pg (pblk[k])
    );
    if (k + 1 < NB) begin : g_ripple
      assign cblk[k+1] = gblk[k] | (pblk[k] & cblk[k]);
    end
  end

  for (genvar j = 0; j < NG; j++) begin : g_grp
    cla_lookahead4 u_l1 (
      .g  (gb[4*j +: 4]),
      .p  (pb[4*j +: 4]),
      .cin(cgrp[j]),
      .c  (cb[4*j +: 4]),
      .gg (ggrp[j]),
      .pg (pgrp[j])
    );
  end

  logic [WP-1:0] sp;
  assign sp = pb ^ cb;
  assign s  = sp[W-1:0];

endmodule
