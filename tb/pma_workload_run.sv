// pma_workload_run: runs inner products of given lengths through one
// pma_top instance and measures the operation time.
//
// For each of the lengths M_A and M_B it sends M random pairs without gaps and
// counts the clock periods from the first pair to result_valid. That count
// must be M + N - 1 with N = ceil(2*ceil(n/2)/K) + 1, and the result must
// equal the exact sum modulo 2. It prints the time in gate delays,
// (M + N - 1) * (2K + 2): K cell delays of two gate levels plus a
// two-gate-level latch per stage.
module pma_workload_run #(
  parameter int N_BITS = 32,
  parameter int K      = 2,
  parameter int M_A    = 20,    // first vector length
  parameter int M_B    = 150    // second vector length, 0 for none
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import pma_pkg::*;

  localparam int SW = 2 * N_BITS - 1;
  localparam int NS = n_stages(N_BITS, K);

  logic              rst_n, in_valid, in_ready, in_last, busy, result_valid;
  logic [N_BITS-1:0] x, y;
  logic [SW-1:0]     result;

  pma_top #(.N_BITS(N_BITS), .K(K)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_last,
                                         .x, .y, .busy, .result_valid, .result);

  initial begin
    logic signed [127:0] ref_sum, px, py;
    int                  cycles;
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_last  = 1'b0;
    x        = '0;
    y        = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2; i++) begin
      int m;
      m = (i == 0) ? M_A : M_B;
      if (m == 0) continue;
      ref_sum = '0;
      cycles  = 0;
      for (int p = 0; p < m; p++) begin
        in_valid = 1'b1;
        in_last  = (p == m - 1);
        // Small magnitudes keep the sum of a long vector inside [-1, 1).
        x = N_BITS'($signed(N_BITS'($urandom)) >>> 4);
        y = N_BITS'($signed(N_BITS'($urandom)) >>> 4);
        px = 128'($signed(x));
        py = 128'($signed(y));
        ref_sum = ref_sum + px * py;
        @(negedge clk);
        cycles++;
      end
      in_valid = 1'b0;
      in_last  = 1'b0;
      while (!result_valid) begin
        @(negedge clk);
        cycles++;
      end
      checks += 2;
      if (cycles != m + NS - 1) begin
        failures++;
        $display("FAIL n=%0d K=%0d M=%0d: %0d clock periods, expected M+N-1 = %0d",
                 N_BITS, K, m, cycles, m + NS - 1);
      end
      if (result !== ref_sum[SW-1:0]) begin
        failures++;
        $display("FAIL n=%0d K=%0d M=%0d: result %h want %h", N_BITS, K, m, result, ref_sum[SW-1:0]);
      end
      $display("n=%0d K=%0d M=%0d: N=%0d, %0d clock periods, tau = %0d gate delays",
               N_BITS, K, m, NS, cycles, cycles * (2 * K + 2));
      @(negedge clk);
    end
    done = 1'b1;
  end
endmodule
