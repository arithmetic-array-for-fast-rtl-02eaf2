// pma_m2: macrocell M2, the 2x2-bit full multiplier for a border block of
// the product matrix that holds the sign bit of one operand.
//
// xa = {s0, s1} is the sign bit and the first fraction bit of one operand,
// yb = {t_b, t_b+1} a bit pair of the other, the more significant bit first.
// Following the Baugh-Wooley style correction, the products of the sign bit
// with the other operand's bits use those bits complemented:
//   weight 4: s0 ~t_b    weight 2: s0 ~t_b+1 and s1 t_b    weight 1: s1 t_b+1
// The same cell serves the blocks where the X bits appear complemented: the
// array connects it with the operands exchanged. Combinational; additive
// inputs and outputs as in pma_mc_adder.
module pma_m2
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
    .p11(xa[1] & ~yb[1]),
    .p01(xa[1] & ~yb[0]),
    .p10(xa[0] &  yb[1]),
    .p00(xa[0] &  yb[0]),
    .v  (v),
    .u  (u),
    .wd (wd),
    .wl (wl)
  );

endmodule
