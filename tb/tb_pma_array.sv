// tb_pma_array: runs the macrocellular array in several configurations:
// the two drawn ones (n = 6 with K = 1 and K = 2), an odd width with K = 3,
// an unpipelined n = 8 array (K larger than the number of cell levels) and
// the full n = 32, K = 2 array. Each instance checks random inner products
// against a reference sum, at exactly M + N - 1 clock edges. The pipelined
// configurations must also show at least one vector whose result was not
// yet complete one edge before the end of the flush.
module tb_pma_array;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NI = 5;
  logic done [NI];
  int   ck [NI], fl [NI], late [NI];

  pma_array_check #(.N_BITS(6),  .K(1),   .NVEC(40)) c0 (.clk, .done(done[0]), .checks(ck[0]), .failures(fl[0]), .late_vectors(late[0]));
  pma_array_check #(.N_BITS(6),  .K(2),   .NVEC(40)) c1 (.clk, .done(done[1]), .checks(ck[1]), .failures(fl[1]), .late_vectors(late[1]));
  pma_array_check #(.N_BITS(7),  .K(3),   .NVEC(40)) c2 (.clk, .done(done[2]), .checks(ck[2]), .failures(fl[2]), .late_vectors(late[2]));
  pma_array_check #(.N_BITS(8),  .K(100), .NVEC(40)) c3 (.clk, .done(done[3]), .checks(ck[3]), .failures(fl[3]), .late_vectors(late[3]));
  pma_array_check #(.N_BITS(32), .K(2),   .NVEC(40)) c4 (.clk, .done(done[4]), .checks(ck[4]), .failures(fl[4]), .late_vectors(late[4]));

  int checks, failures;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NI; i++) begin
      checks   += ck[i];
      failures += fl[i];
      $display("config %0d: checks=%0d failures=%0d incomplete-before-last-flush=%0d", i, ck[i], fl[i], late[i]);
    end
    // Where K divides 2*ceil(n/2) the flush of ceil(2*ceil(n/2)/K) zero
    // pairs equals the number of pipeline cuts, and its last cycle must
    // matter. (n = 7, K = 3 has 2 cuts but a flush of 3; n = 8 unpipelined
    // has no cut.)
    for (int i = 0; i < NI; i++) begin
      if (i == 2 || i == 3) continue;
      checks++;
      if (late[i] == 0) begin
        failures++;
        $display("FAIL config %0d: the last flush cycle never mattered", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
