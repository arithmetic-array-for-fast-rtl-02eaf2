// pma_array_check: drives one pma_array instance with random inner
// products and checks the accumulator against a reference sum.
//
// Each vector has M pairs (M = 1, 20 or random 1..24); the first cycle
// raises acc_clear, the pairs follow back to back, then FLUSH zero pairs.
// Exactly M + FLUSH clock edges after the first pair the accumulator must
// equal sum X_p*Y_p modulo 2 (2*N_BITS-1 bit two's complement), computed
// here with 128-bit integer arithmetic. Operands are random, with the
// extreme values -1 and 1-2^-(n-1) mixed in. It also counts vectors whose
// accumulator was still different one edge earlier, i.e. where the last
// zero pair was needed.
module pma_array_check #(
  parameter int N_BITS = 6,
  parameter int K      = 1,
  parameter int NVEC   = 20
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   late_vectors
);
  import pma_pkg::*;

  localparam int FLUSH = n_stages(N_BITS, K) - 1;
  localparam int SW    = 2 * N_BITS - 1;

  logic                rst_n;
  logic                acc_clear;
  logic [N_BITS-1:0]   x, y;
  logic [2*N_BITS-2:0] s;

  pma_array #(.N_BITS(N_BITS), .K(K)) dut (.clk, .rst_n, .acc_clear, .x, .y, .s);

  function automatic logic [N_BITS-1:0] pick();
    int sel;
    sel = $urandom_range(0, 7);
    unique case (sel)
      0:       return {1'b1, {(N_BITS-1){1'b0}}};   // -1
      1:       return {1'b0, {(N_BITS-1){1'b1}}};   // largest positive
      default: return N_BITS'($urandom);
    endcase
  endfunction

  initial begin
    logic signed [127:0] ref_sum, px, py;
    logic [SW-1:0]       want;
    int                  m;
    done         = 1'b0;
    checks       = 0;
    failures     = 0;
    late_vectors = 0;
    rst_n        = 1'b0;
    acc_clear    = 1'b0;
    x            = '0;
    y            = '0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int vec = 0; vec < NVEC; vec++) begin
      m = (vec == 0) ? 1 : (vec == 1) ? 20 : $urandom_range(1, 24);
      ref_sum = '0;
      for (int p = 0; p < m; p++) begin
        x = pick();
        y = pick();
        if (vec == 2) begin   // (-1)*(-1) = 1 wraps to -1
          x = {1'b1, {(N_BITS-1){1'b0}}};
          y = x;
        end
        acc_clear = (p == 0);
        px = 128'($signed(x));
        py = 128'($signed(y));
        ref_sum = ref_sum + px * py;
        @(negedge clk);
      end
      acc_clear = 1'b0;
      x = '0;
      y = '0;
      want = ref_sum[SW-1:0];
      for (int f = 0; f < FLUSH - 1; f++) @(negedge clk);
      if (s !== want) late_vectors++;
      @(negedge clk);
      checks++;
      if (s !== want) begin
        failures++;
        $display("FAIL N_BITS=%0d K=%0d vector %0d (M=%0d): got %h want %h",
                 N_BITS, K, vec, m, s, want);
      end
      // Idle zero pairs must leave the result unchanged.
      @(negedge clk);
      checks++;
      if (s !== want) begin
        failures++;
        $display("FAIL N_BITS=%0d K=%0d vector %0d: result changed while idle", N_BITS, K, vec);
      end
    end
    done = 1'b1;
  end
endmodule
