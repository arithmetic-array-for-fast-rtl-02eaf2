// tb_pma_workloads: the configurations the array is evaluated at.
// n = 32 with pipelining degrees K = 1..5, each for vectors of 20 pairs
// (filter length) and 150 pairs (correlator length); n = 16 and n = 24 at
// K = 2 for 20 pairs. Each run checks the result and that the operation
// takes M + N(K) - 1 clock periods.
module tb_pma_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NI = 7;
  logic done [NI];
  int   ck [NI], fl [NI];

  pma_workload_run #(.N_BITS(32), .K(1)) r0 (.clk, .done(done[0]), .checks(ck[0]), .failures(fl[0]));
  pma_workload_run #(.N_BITS(32), .K(2)) r1 (.clk, .done(done[1]), .checks(ck[1]), .failures(fl[1]));
  pma_workload_run #(.N_BITS(32), .K(3)) r2 (.clk, .done(done[2]), .checks(ck[2]), .failures(fl[2]));
  pma_workload_run #(.N_BITS(32), .K(4)) r3 (.clk, .done(done[3]), .checks(ck[3]), .failures(fl[3]));
  pma_workload_run #(.N_BITS(32), .K(5)) r4 (.clk, .done(done[4]), .checks(ck[4]), .failures(fl[4]));
  pma_workload_run #(.N_BITS(16), .K(2), .M_B(0)) r5 (.clk, .done(done[5]), .checks(ck[5]), .failures(fl[5]));
  pma_workload_run #(.N_BITS(24), .K(2), .M_B(0)) r6 (.clk, .done(done[6]), .checks(ck[6]), .failures(fl[6]));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks, failures;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6]);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NI; i++) begin
      checks   += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
