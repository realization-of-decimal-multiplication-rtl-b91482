// wallace_tree: carry-save reduction of ROWS operand rows to two rows.
//
// Each level groups its rows in threes and replaces every group by the sum
// and carry rows of a csa_row (3:2 compressor); the one or two rows left over
// pass to the next level unchanged. Levels repeat until at most two rows
// remain, so r rows become 2*floor(r/3) + r%3 per level. With the default
// nine rows (eight partial products and one row of negation bits) the tree
// has four levels: 9 -> 6 -> 4 -> 3 -> 2.
//
// Reducing the rows with a Wallace tree of carry-save adders follows the
// reference design; the grouping in threes is the usual Wallace scheme and
// this design's choice.
//
// sum + carry == sum of all rows (mod 2^W). The carry row is already
// shifted to its weight. Purely combinational.
module wallace_tree #(
  parameter int unsigned ROWS = 9,
  parameter int unsigned W    = 32
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  function automatic int unsigned rows_after(int unsigned r);
    return (r / 3) * 2 + (r % 3);
  endfunction

  // Number of rows present at the input of level lvl.
  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned r = ROWS;
    for (int unsigned i = 0; i < lvl; i++) r = rows_after(r);
    return r;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned r = ROWS;
    int unsigned l = 0;
    while (r > 2) begin
      r = rows_after(r);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  // Each level keeps its own input and output arrays; level l reads the
  // output of level l-1.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned R = rows_at(l);
    localparam int unsigned G = R / 3;
    localparam int unsigned NEXT = rows_after(R);

    logic [W-1:0] lin  [ROWS];
    logic [W-1:0] lout [ROWS];

    if (l == 0) begin : g_first
      assign lin = rows;
    end else begin : g_next
      assign lin = g_lvl[l-1].lout;
    end

    for (genvar g = 0; g < G; g++) begin : g_csa
      csa_row #(.W(W)) u_csa (
        .a (lin[3*g]),
        .b (lin[3*g+1]),
        .c (lin[3*g+2]),
        .s (lout[2*g]),
        .cy(lout[2*g+1])
      );
    end
    for (genvar k = 0; k < R % 3; k++) begin : g_pass
      assign lout[2*G+k] = lin[3*G+k];
    end
    for (genvar u = NEXT; u < ROWS; u++) begin : g_unused
      assign lout[u] = '0;
    end
  end

  if (LEVELS == 0) begin : g_direct
    assign sum   = rows[0];
    if (ROWS >= 2) begin : g_two
      assign carry = rows[1];
    end else begin : g_one
      assign carry = '0;
    end
  end else begin : g_out
    assign sum   = g_lvl[LEVELS-1].lout[0];
    assign carry = g_lvl[LEVELS-1].lout[1];
  end

endmodule
