// Multi-operand adder: Wallace tree of 3:2 carry-save adders plus a final
// carry-propagate adder.
//
// ROWS operands of W bits are summed modulo 2^W. At every tree level the
// rows are taken in groups of three and each group is replaced by a sum and
// a carry word (csa_3to2); the one or two rows left over pass to the next
// level unchanged. A level turns n rows into 2*floor(n/3) + n mod 3 rows,
// and the tree stops when two rows remain; those are added by one ordinary
// carry-propagate adder. For the 16 x 16 multiplier (6 partial products plus
// the correction word, 7 rows) the tree has 4 levels: 7 -> 5 -> 4 -> 3 -> 2.
//
// The three-step structure (partial products, reduction to two rows, final
// carry-propagate addition) and the use of a Wallace tree follow the design's
// source; the word-level grouping of rows is this design's choice.
//
// Purely combinational.
module wallace_adder #(
  parameter int unsigned ROWS = 7,  // number of operands, at least 2
  parameter int unsigned W    = 32  // operand and result width
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum
);

  // Number of rows left after lvl levels of 3:2 reduction.
  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned n = ROWS;
    for (int unsigned i = 0; i < lvl; i++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  // Number of levels needed to get down to two rows.
  function automatic int unsigned num_levels();
    int unsigned n = ROWS;
    int unsigned l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  if (ROWS < 2) begin : g_bad_rows
    $error("wallace_adder needs ROWS >= 2");
  end

  // g_lv[l].r holds the rows entering level l (g_lv[LEVELS].r: the final
  // two). One array per level keeps the levels visibly acyclic.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lv
    logic [W-1:0] r [rows_at(l)];
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_in
    assign g_lv[0].r[i] = rows[i];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NIN  = rows_at(l);
    localparam int unsigned NCSA = NIN / 3;

    for (genvar k = 0; k < NCSA; k++) begin : g_csa
      csa_3to2 #(.W(W)) u_csa (
        .x (g_lv[l].r[3*k]),
        .y (g_lv[l].r[3*k+1]),
        .z (g_lv[l].r[3*k+2]),
        .s (g_lv[l+1].r[2*k]),
        .c (g_lv[l+1].r[2*k+1])
      );
    end

    for (genvar r = 0; r < NIN % 3; r++) begin : g_pass
      assign g_lv[l+1].r[2*NCSA + r] = g_lv[l].r[3*NCSA + r];
    end
  end

  assign sum = g_lv[LEVELS].r[0] + g_lv[LEVELS].r[1];

endmodule
