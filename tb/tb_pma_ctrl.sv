// tb_pma_ctrl: checks the zero-flush sequencer on its own (N_BITS = 8,
// FLUSH = 4).
//
// A model written here predicts, every cycle, in_ready, acc_clear, the
// pair passed to the array (the input pair when accepted, zero otherwise),
// busy and result_valid. The stream has random gaps, vectors of 1 to 6
// pairs and random idle time between vectors. The test also counts the
// flush length from the last pair to result_valid.
module tb_pma_ctrl;
  localparam int N_BITS = 8;
  localparam int FLUSH  = 4;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              in_valid, in_ready, in_last;
  logic [N_BITS-1:0] x, y, arr_x, arr_y;
  logic              acc_clear, busy, result_valid;
  int                checks = 0, failures = 0;

  pma_ctrl #(.N_BITS(N_BITS), .FLUSH(FLUSH)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_last, .x, .y,
    .acc_clear, .arr_x, .arr_y, .busy, .result_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s at %0t: got %0d want %0d", what, $time, got, want);
    end
  endtask

  // Reference model state
  typedef enum int { M_IDLE, M_RUN, M_FLUSH, M_DONE } mstate_e;
  mstate_e ms;
  int      mcnt;
  int      flush_seen;

  initial begin
    int left, last_cycle, cyc;
    logic acc, first;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_last  = 1'b0;
    x = '0;
    y = '0;
    ms = M_IDLE;
    mcnt = 0;
    flush_seen = 0;
    left = 0;
    cyc = 0;
    last_cycle = 0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      // stimulus
      in_valid = ($urandom_range(0, 3) != 0);
      x = N_BITS'($urandom);
      y = N_BITS'($urandom);
      if (in_valid && left == 0) left = $urandom_range(1, 6);
      in_last = (left == 1);
      #1;
      // expected outputs
      acc = in_valid && (ms != M_FLUSH);
      first = acc && (ms != M_RUN);
      check(in_ready, ms != M_FLUSH, "in_ready");
      check(acc_clear, first, "acc_clear");
      checks++;
      if (arr_x !== (acc ? x : '0) || arr_y !== (acc ? y : '0)) begin
        failures++;
        $display("FAIL pair passed to the array at %0t", $time);
      end
      check(busy, ms == M_RUN || ms == M_FLUSH, "busy");
      check(result_valid, ms == M_DONE, "result_valid");
      if (ms == M_DONE && cyc - last_cycle == FLUSH + 1) flush_seen++;
      // model update
      unique case (ms)
        M_IDLE, M_DONE, M_RUN:
          if (acc) begin
            left--;
            if (in_last) begin
              ms = M_FLUSH;
              mcnt = FLUSH;
              last_cycle = cyc;
            end else ms = M_RUN;
          end
        M_FLUSH: begin
          mcnt--;
          if (mcnt == 0) ms = M_DONE;
        end
      endcase
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (flush_seen == 0) begin
      failures++;
      $display("FAIL no result after exactly FLUSH zero pairs was seen");
    end
    $display("flushes completed: %0d", flush_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
