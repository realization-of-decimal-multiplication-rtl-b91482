// booth_pkg: types and constants shared by the radix-16 modified Booth
// multiplier.
//
// booth_ctrl_t is the word a Booth encoder hands to a Booth selector for one
// radix-4 digit d in {-2,-1,0,+1,+2}: `one` means |d| = 1, `two` means |d| = 2
// (neither means d = 0) and `neg` means d is negative. The selector inverts the
// chosen multiple when `neg` is set and the adder adds `neg` back in as the +1
// of the two's complement. This encoding is this design's choice; the digit
// set itself is the one of the modified Booth algorithm.
//
// N_DEFAULT is the operand width of the reference configuration, 16 bits
// (multiplicand x[15:0], multiplier y[15:0], product p[31:0]).
package booth_pkg;

  localparam int unsigned N_DEFAULT = 16;

  typedef struct packed {
    logic neg;  // digit is negative
    logic one;  // |digit| == 1
    logic two;  // |digit| == 2
  } booth_ctrl_t;

endpackage
