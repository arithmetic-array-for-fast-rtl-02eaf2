// pma_acell: additive cell A of the accumulating row.
//
// Adds the redundant product bits arriving from above (v0 of weight 1,
// v11 and v12 of weight 2), the carry from the A cell on the right (u0,
// u1) and two bits of the previously accumulated result (c0, c1):
//   8*w3 + 4*w2 + 2*w1 + w0 = (v0 + u0 + c0) + 2*(v11 + v12 + u1 + c1)
// The sum is at most 11. {w1, w0} are the cell's two new result bits and
// go to the accumulator flip-flops; {w3, w2} go to the next A cell on the
// left. Combinational. Written as an addition; the gate structure is left to
// synthesis.
module pma_acell
  import pma_pkg::*;
(
  input  mc_v_t      v,
  input  mc_u_t      u,
  input  logic [1:0] c,
  output logic [1:0] s,
  output mc_u_t      wl
);

  logic [3:0] sum;

  always_comb begin
    sum = 4'(v.b0) + 4'(u.b0) + 4'(c[0])
        + 4'({v.b11, 1'b0}) + 4'({v.b12, 1'b0}) + 4'({u.b1, 1'b0}) + 4'({c[1], 1'b0});
    s    = sum[1:0];
    wl.b0 = sum[2];
    wl.b1 = sum[3];
  end

endmodule
