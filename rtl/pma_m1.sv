// pma_m1: macrocell M1, the 2x2-bit full multiplier for an interior block
// of the product matrix, where no factor bit appears complemented.
//
// xa = {x_a, x_a+1} and yb = {y_b, y_b+1} are two bit pairs of the operands,
// the more significant bit first. The elementary products are
//   weight 4: x_a y_b    weight 2: x_a y_b+1 and x_a+1 y_b    weight 1: x_a+1 y_b+1
// and are added to the additive inputs by pma_mc_adder (see there for the
// two independent circuits and the meaning of v, u, wd, wl).
// Purely combinational; the array places flip-flops between cells.
module pma_m1
  import pma_pkg::*;
(
  input  logic [1:0] xa,
  input  logic [1:0] yb,
  input  mc_v_t      v,
  input  mc_u_t      u,
  output mc_v_t      wd,
  output mc_u_t      wl
);

  pma_mc_adder u_add (
    .p11(xa[1] & yb[1]),
    .p01(xa[1] & yb[0]),
    .p10(xa[0] & yb[1]),
    .p00(xa[0] & yb[0]),
    .v  (v),
    .u  (u),
    .wd (wd),
    .wl (wl)
  );

endmodule
