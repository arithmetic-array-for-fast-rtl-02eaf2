// tb_pma_acell: exhaustive check of the additive cell A.
//
// Applies all 128 combinations of v0, v11, v12, u0, u1, c0, c1 and checks
// 8*w3 + 4*w2 + 2*w1 + w0 = (v0 + u0 + c0) + 2*(v11 + v12 + u1 + c1).
module tb_pma_acell;
  import pma_pkg::*;

  mc_v_t      v;
  mc_u_t      u, wl;
  logic [1:0] c, s;
  int         checks = 0, failures = 0;

  pma_acell dut (.v, .u, .c, .s, .wl);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, got;
    for (int i = 0; i < 128; i++) begin
      {v, u, c} = 7'(i);
      #1;
      want = int'(v.b0) + int'(u.b0) + int'(c[0])
           + 2 * (int'(v.b11) + int'(v.b12) + int'(u.b1) + int'(c[1]));
      got  = int'(s) + 4 * int'(wl.b0) + 8 * int'(wl.b1);
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL in=%02h got %0d want %0d", i, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
