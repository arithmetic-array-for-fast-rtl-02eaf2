// pma_mc_adder: additive part of a 2x2-bit macrocell.
//
// A macrocell adds the four elementary products of a 2x2 block of the
// product matrix to five additive inputs. It is split into two independent
// circuits:
//   low  circuit:  2*w12 + w0            = p00 + u0 + v0
//   high circuit:  8*w3 + 4*w2 + 2*w11   = 4*p11 + 2*(p01 + p10 + u1 + v11 + v12)
// The carry w12 of the low circuit is not added into the high circuit; it
// leaves downwards next to w11 and is absorbed by a later cell. This keeps
// the delay of both circuits at one cell level. Weights are local to the
// cell (p00 has weight 1). Purely combinational. The split follows the
// published cell; writing each circuit as an addition and leaving the gates
// to synthesis is this design's choice.
module pma_mc_adder
  import pma_pkg::*;
(
  input  logic  p00,
  input  logic  p01,
  input  logic  p10,
  input  logic  p11,
  input  mc_v_t v,
  input  mc_u_t u,
  output mc_v_t wd,
  output mc_u_t wl
);

  logic [1:0] lo_sum;   // 0..3
  logic [2:0] hi_sum;   // 0..7, in units of weight 2

  always_comb begin
    lo_sum = 2'(p00) + 2'(u.b0) + 2'(v.b0);
    hi_sum = 3'({p11, 1'b0}) + 3'(p01) + 3'(p10) + 3'(u.b1) + 3'(v.b11) + 3'(v.b12);
    wd.b0  = lo_sum[0];
    wd.b12 = lo_sum[1];
    wd.b11 = hi_sum[0];
    wl.b0  = hi_sum[1];   // w2
    wl.b1  = hi_sum[2];   // w3
  end

endmodule
