// tb_pma_pipe_reg: checks the delay of the array's pipeline element for
// DEPTH = 0 (wire), 1 and 3, against a history of the random input words,
// and that reset clears it.
module tb_pma_pipe_reg;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [2:0] d;
  logic [2:0] q0, q1, q3;
  logic [2:0] hist [4];
  int         checks = 0, failures = 0;

  pma_pipe_reg #(.W(3), .DEPTH(0)) dut0 (.clk, .rst_n, .d, .q(q0));
  pma_pipe_reg #(.W(3), .DEPTH(1)) dut1 (.clk, .rst_n, .d, .q(q1));
  pma_pipe_reg #(.W(3), .DEPTH(3)) dut3 (.clk, .rst_n, .d, .q(q3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [2:0] got, input logic [2:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    d     = 3'd7;
    #2;
    check(q1, 3'd0, "reset DEPTH=1");
    check(q3, 3'd0, "reset DEPTH=3");
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) hist[i] = '0;
    for (int n = 0; n < 200; n++) begin
      d = 3'($urandom);
      #1;
      check(q0, d, "DEPTH=0");
      @(posedge clk);
      for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = d;
      #1;
      check(q1, hist[0], "DEPTH=1");
      if (n >= 2) check(q3, hist[2], "DEPTH=3");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
