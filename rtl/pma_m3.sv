// pma_m3: macrocell M3, the 2x2-bit full multiplier for the corner block of
// the product matrix that holds both sign bits.
//
// xa = {x0, x1} and yb = {y0, y1} (sign bit first). The elementary products
// of this block are
//   weight 4: x0 y0    weight 2: x0 ~y1 and ~x1 y0    weight 1: x1 y1
// added to the additive inputs as in pma_mc_adder. Combinational.
module pma_m3
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
    .p11( xa[1] &  yb[1]),
    .p01( xa[1] & ~yb[0]),
    .p10(~xa[0] &  yb[1]),
    .p00( xa[0] &  yb[0]),
    .v  (v),
    .u  (u),
    .wd (wd),
    .wl (wl)
  );

endmodule
