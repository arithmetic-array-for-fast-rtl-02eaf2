// pma_pkg: types and elaboration-time geometry shared by the pipelined
// macrocellular inner-product array (PMA).
//
// Operands are n-bit two's complement fractions; they are handled as
// NR = ceil(n/2) bit pairs. The multiplier sub-array has 2*NR-1 columns
// c = 0..2*NR-2; column c holds the 2x2 blocks (p, q) of the product matrix
// with p + q = c, stacked from the bottom row upwards. Every cell is given a
// level e counted from the top of the array along anti-diagonals
// (e = 2*NR - row - column, the A row being row 0 and the corner A cell
// column -1). A pipeline cut lies after every K levels; a connection carries
// one flip-flop for each cut it crosses. With this numbering the number of
// signals crossing cut b is 5*NR, 5*NR-1, 5*NR-3, then 5 fewer every second
// cut, which is the latch count of the published cost model. The number of
// pipe stages is N = ceil(2*NR/K) + 1, and N-1 zero pairs empty the pipe.
// The order of the cells inside a column is this design's choice (the
// interior M1 cells at the bottom, the border M2 cells at the top, as drawn
// for n = 6); the arithmetic does not depend on it.
package pma_pkg;

  // Bundle of the three vertical additive signals of a cell: outputs
  // w12, w11 (weight 2) and w0 (weight 1) feed inputs v12, v11, v0 below.
  typedef struct packed {
    logic b12;
    logic b11;
    logic b0;
  } mc_v_t;

  // Bundle of the two horizontal signals: outputs w3 (weight 8) and w2
  // (weight 4) feed inputs u1 (weight 2) and u0 (weight 1) of the cell on
  // the left.
  typedef struct packed {
    logic b1;
    logic b0;
  } mc_u_t;

  typedef enum logic [1:0] {
    CELL_M1,   // interior block, no complemented factor bit
    CELL_M2,   // border block holding one sign bit
    CELL_M3    // corner block holding both sign bits
  } cell_kind_e;

  // Number of bit pairs, n_r = ceil(n/2).
  function automatic int n_pairs(input int n);
    return (n + 1) / 2;
  endfunction

  // Number of pipe stages N(K) = ceil(2*n_r/K) + 1.
  function automatic int n_stages(input int n, input int k);
    int nr;
    nr = n_pairs(n);
    return (2 * nr + k - 1) / k + 1;
  endfunction

  // Cells in multiplier column c (0 .. 2*nr-2).
  function automatic int col_height(input int nr, input int c);
    return ((c < 2 * nr - 2 - c) ? c : 2 * nr - 2 - c) + 1;
  endfunction

  // X pair index p of the cell in column c, row t (0 = bottom multiplier
  // row). Rows alternate around the middle of the column so that p and q
  // are closest at the bottom.
  function automatic int cell_p(input int c, input int t);
    int m;
    m = c / 2;
    if (c % 2 == 1)
      return (t % 2 == 1) ? m + (t + 1) / 2 : m - t / 2;
    else
      return (t % 2 == 1) ? m - (t + 1) / 2 : m + t / 2;
  endfunction

  function automatic cell_kind_e cell_kind(input int p, input int q);
    if (p == 0 && q == 0) return CELL_M3;
    if (p == 0 || q == 0) return CELL_M2;
    return CELL_M1;
  endfunction

  // Level of a cell, counted from 1 at the top of the array; row 0 is the
  // A row, column -1 the sign column of A cells.
  function automatic int level(input int nr, input int row, input int col);
    return 2 * nr - row - col;
  endfunction

  // Flip-flops on a connection from a cell of level e_src to one of level
  // e_dst (e_dst > e_src): the number of cuts between them.
  function automatic int cuts_between(input int k, input int e_src, input int e_dst);
    return (e_dst - 1) / k - (e_src - 1) / k;
  endfunction

endpackage
