// tb_pma_m1: exhaustive check of macrocell M1.
//
// Applies all 512 combinations of the four factor bits and the five
// additive inputs. The expected outputs are worked out here from the
// elementary products of the block (all factor bits uncomplemented) and the two separate sums of the
// cell: 2*w12 + w0 = p00 + u0 + v0 and 8*w3 + 4*w2 + 2*w11 =
// 4*p11 + 2*(p01 + p10 + u1 + v11 + v12).
module tb_pma_m1;
  import pma_pkg::*;

  logic [1:0] xa, yb;
  mc_v_t      v, wd;
  mc_u_t      u, wl;
  int         checks = 0, failures = 0;

  pma_m1 dut (.xa, .yb, .v, .u, .wd, .wl);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p11, p01, p10, p00, lo, hi;
    for (int i = 0; i < 512; i++) begin
      {xa, yb, v, u} = 9'(i);
      #1;
      p11 = int'(xa[1] & yb[1]);
      p01 = int'(xa[1] & yb[0]);
      p10 = int'(xa[0] & yb[1]);
      p00 = int'(xa[0] & yb[0]);
      lo  = p00 + int'(u.b0) + int'(v.b0);
      hi  = 2 * p11 + p01 + p10 + int'(u.b1) + int'(v.b11) + int'(v.b12);
      checks++;
      if (int'(wd.b0) + 2 * int'(wd.b12) != lo) begin
        failures++;
        $display("FAIL low circuit: in=%03h got w12=%0d w0=%0d want %0d", i, wd.b12, wd.b0, lo);
      end
      checks++;
      if (int'(wd.b11) + 2 * int'(wl.b0) + 4 * int'(wl.b1) != hi) begin
        failures++;
        $display("FAIL high circuit: in=%03h got w3=%0d w2=%0d w11=%0d want %0d", i, wl.b1, wl.b0, wd.b11, hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
