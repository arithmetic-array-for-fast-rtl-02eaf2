// pma_array: pipelined macrocellular array that accumulates S += X*Y.
//
// X and Y are N_BITS-bit two's complement fractions (sign bit in the MSB,
// weight -1; bit i below it has weight 2^-i). Each cycle the applied pair
// is expanded into a Baugh-Wooley style matrix of elementary products,
//   X*Y = x0 y0 + (x0 xor y0) + sum x_i y_j 2^-(i+j) + sum x0 ~y_i 2^-i
//         + sum y0 ~x_i 2^-i + (x0 + y0) 2^-(n-1)          (mod 2)
// which is covered by 2x2-bit blocks: (NR-1)^2 M1 cells, 2(NR-1) M2 cells and
// one M3 cell, NR = ceil(N_BITS/2). An odd N_BITS is padded with a zero LSB.
// Cells of block (p, q) sit in column c = p + q; within a column additive
// bits flow downwards, the w2/w3 outputs flow one column to the left (two
// weights up). The top cell of the middle column takes the two constants
// x0 and y0 of weight 2^-(n-1); x0 xor y0 enters an extra A cell left of
// the M3 cell. The product leaves the bottom of the columns in a redundant
// code (two bits per odd weight) and is added by a row of 2*NR A cells to the
// previously accumulated result, held in 2*N_BITS-1 accumulator flip-flops
// fed back into the A cells.
//
// Pipelining: a flip-flop stage cuts the array every K cell levels (levels
// are anti-diagonals counted from the top; see pma_pkg). Flip-flops sit only
// on the additive connections: the factor bits reach every cell in the same
// cycle. So a cell adds the products of the current pair to partial sums of
// earlier pairs. Order does not matter for the sum, so the accumulator holds
// the exact result once the pipe has been emptied with N-1 = ceil(2NR/K)
// zero pairs after the last pair. In between, the accumulator value equals
// no partial sum S_p. A K of at least 2*NR+1 gives the unpipelined array.
//
// Interface: x, y are sampled combinationally each cycle (drive zeros when
// no pair is applied). acc_clear starts a new sum: during that cycle the A
// cells see zero in place of the stored result. s is the accumulator,
// S0 (sign) in the MSB; it is meaningful after the flush. Arithmetic is
// modulo 2 (sums outside [-1, 1) wrap). Asynchronous active-low reset.
module pma_array
  import pma_pkg::*;
#(
  parameter int N_BITS = 32,
  parameter int K      = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                acc_clear,
  input  logic [N_BITS-1:0]   x,
  input  logic [N_BITS-1:0]   y,
  output logic [2*N_BITS-2:0] s
);

  localparam int NR   = n_pairs(N_BITS);
  localparam int NP   = 2 * NR;        // padded operand width
  localparam int NCOL = 2 * NR - 1;    // multiplier columns

  initial begin
    assert (N_BITS >= 2) else $error("pma_array: N_BITS must be at least 2");
    assert (K >= 1) else $error("pma_array: K must be at least 1");
  end

  // Padded operands: bit i of the fraction (i = 0 is the sign) is xp[NP-1-i].
  logic [NP-1:0] xp, yp;
  assign xp = NP'({x, {(NP - N_BITS){1'b0}}});
  assign yp = NP'({y, {(NP - N_BITS){1'b0}}});

  // Each cell g_col[c].g_row[t].g_cell declares its outputs wd (down) and
  // wl (left) and its inputs vin (from above) and uin (from the right).

  // ---------------------------------------------------------------------
  // Multiplier sub-array
  // ---------------------------------------------------------------------
  for (genvar c = 0; c < NCOL; c++) begin : g_col
    localparam int H = col_height(NR, c);
    for (genvar t = 0; t < NR; t++) begin : g_row
      if (t < H) begin : g_cell
        mc_v_t wd, vin;
        mc_u_t wl, uin;
        localparam int P     = cell_p(c, t);
        localparam int Q     = c - P;
        localparam int E_DST = level(NR, t + 1, c);
        localparam cell_kind_e KIND = cell_kind(P, Q);

        logic [1:0] xa, yb;
        assign xa = xp[NP-1-2*P -: 2];
        assign yb = yp[NP-1-2*Q -: 2];

        // v: from the cell above, or at the top of a column from the top
        // of the taller column on the right, or the correction constants.
        if (t < H - 1) begin : g_v_above
          pma_pipe_reg #(.W(3), .DEPTH(cuts_between(K, level(NR, t + 2, c), E_DST))) u_v (
            .clk, .rst_n, .d(g_col[c].g_row[t+1].g_cell.wd), .q(vin));
        end else if (c < NR - 1) begin : g_v_diag
          mc_v_t diag;
          assign diag = '{b12: 1'b0, b11: g_col[c+1].g_row[t+1].g_cell.wl.b1, b0: g_col[c+1].g_row[t+1].g_cell.wl.b0};
          pma_pipe_reg #(.W(3), .DEPTH(cuts_between(K, level(NR, t + 2, c + 1), E_DST))) u_v (
            .clk, .rst_n, .d(diag), .q(vin));
        end else if (c == NR - 1) begin : g_v_const
          // x0 * 2^-(n-1) and y0 * 2^-(n-1): local weight 2 of this column.
          assign vin = '{b12: xp[NP-1], b11: yp[NP-1], b0: 1'b0};
        end else begin : g_v_zero
          assign vin = '0;
        end

        // u: w2/w3 of the same row in the column on the right, if that
        // column reaches this row. (The top of a taller column on the right
        // lies one row higher and feeds v, above.)
        if (c + 1 < NCOL && t < col_height(NR, c + 1)) begin : g_u_right
          pma_pipe_reg #(.W(2), .DEPTH(cuts_between(K, level(NR, t + 1, c + 1), E_DST))) u_u (
            .clk, .rst_n, .d(g_col[c+1].g_row[t].g_cell.wl), .q(uin));
        end else begin : g_u_zero
          assign uin = '0;
        end

        if (KIND == CELL_M3) begin : g_m3
          pma_m3 u_cell (.xa, .yb, .v(vin), .u(uin), .wd, .wl);
        end else if (KIND == CELL_M2 && P == 0) begin : g_m2x
          pma_m2 u_cell (.xa, .yb, .v(vin), .u(uin), .wd, .wl);
        end else if (KIND == CELL_M2) begin : g_m2y
          // Sign bit of Y with a bit pair of X: same cell, roles exchanged.
          pma_m2 u_cell (.xa(yb), .yb(xa), .v(vin), .u(uin), .wd, .wl);
        end else begin : g_m1
          pma_m1 u_cell (.xa, .yb, .v(vin), .u(uin), .wd, .wl);
        end
      end
    end
  end

  // ---------------------------------------------------------------------
  // Corner A cell (column -1, first multiplier row): adds x0 xor y0 to the
  // weight 2^0 output of the M3 cell.
  // ---------------------------------------------------------------------
  mc_u_t      corner_u;
  logic [1:0] corner_s;
  mc_u_t      corner_wl;   // weights 2^2 and 2^3: outside the fraction, left unused

  pma_pipe_reg #(.W(2), .DEPTH(cuts_between(K, level(NR, 1, 0), level(NR, 1, -1)))) u_corner_u (
    .clk, .rst_n, .d(g_col[0].g_row[0].g_cell.wl), .q(corner_u));

  pma_acell u_corner (
    .v ('{b12: 1'b0, b11: 1'b0, b0: xp[NP-1] ^ yp[NP-1]}),
    .u (corner_u),
    .c (2'b00),
    .s (corner_s),
    .wl(corner_wl)
  );

  // ---------------------------------------------------------------------
  // Accumulating row of A cells, columns -1 .. NCOL-1 (index c+1).
  // ---------------------------------------------------------------------
  mc_v_t      a_v   [NCOL+1];
  mc_u_t      a_u   [NCOL+1];
  mc_u_t      a_wl  [NCOL+1];
  logic [1:0] a_s   [NCOL+1];
  logic [1:0] acc_q [NCOL+1];

  for (genvar c = -1; c < NCOL; c++) begin : g_arow
    localparam int E_DST = level(NR, 0, c);

    if (c == -1) begin : g_v_corner
      mc_v_t cv;
      assign cv = '{b12: 1'b0, b11: corner_s[1], b0: corner_s[0]};
      pma_pipe_reg #(.W(3), .DEPTH(cuts_between(K, level(NR, 1, -1), E_DST))) u_v (
        .clk, .rst_n, .d(cv), .q(a_v[c+1]));
    end else begin : g_v_col
      pma_pipe_reg #(.W(3), .DEPTH(cuts_between(K, level(NR, 1, c), E_DST))) u_v (
        .clk, .rst_n, .d(g_col[c].g_row[0].g_cell.wd), .q(a_v[c+1]));
    end

    if (c + 1 < NCOL) begin : g_u_right
      pma_pipe_reg #(.W(2), .DEPTH(cuts_between(K, level(NR, 0, c + 1), E_DST))) u_u (
        .clk, .rst_n, .d(a_wl[c+2]), .q(a_u[c+1]));
    end else begin : g_u_zero
      assign a_u[c+1] = '0;
    end

    pma_acell u_a (
      .v (a_v[c+1]),
      .u (a_u[c+1]),
      .c (acc_clear ? 2'b00 : acc_q[c+1]),
      .s (a_s[c+1]),
      .wl(a_wl[c+1])
    );

    // Accumulator flip-flops. Column -1 keeps only S0; its weight-2 bit
    // (2^1) lies outside the fraction and is dropped.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        acc_q[c+1] <= '0;
      else if (c == -1)  acc_q[c+1] <= {1'b0, a_s[c+1][0]};
      else               acc_q[c+1] <= a_s[c+1];
    end
  end

  // Result bits: column c >= 0 holds S(2c+1) (weight 2) and S(2c+2)
  // (weight 1); column -1 holds S0. s is MSB-first: s[2n-2] = S0.
  logic [2*NP-2:0] s_full;
  always_comb begin
    s_full[2*NP-2] = acc_q[0][0];
    for (int c = 0; c < NCOL; c++) begin
      s_full[2*NP-2-(2*c+1)] = acc_q[c+1][1];
      s_full[2*NP-2-(2*c+2)] = acc_q[c+1][0];
    end
  end
  assign s = s_full[2*NP-2 -: 2*N_BITS-1];

endmodule
