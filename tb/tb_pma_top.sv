// tb_pma_top: end-to-end test of the inner-product array at its default
// size (32-bit operands, K = 2, so N = 17 stages and 16 zero pairs).
//
// Sends 40 vectors through the valid/ready interface: lengths 1, 20 (the
// filter length used to compare designs) and random 1..40, some without
// gaps, some with random gaps, some starting in the cycle after the
// previous result appears. The reference is the exact sum of X_p*Y_p over
// the accepted pairs, taken modulo 2 (63-bit two's complement). Checked:
// the result value; the operation time, M + N - 1 clock periods from the
// first pair to result_valid for a vector without gaps (plus one cycle per
// gap otherwise); in_ready low during the flush; the result held while
// idle. Counted, each of which must occur at least once: zero-pair flushes,
// gaps (zero pairs inside a vector), back-to-back vectors, pairs with a
// negative operand (sign-bit correction terms), sums that wrap past +-1,
// and offers refused during a flush.
module tb_pma_top;
  localparam int N_BITS = 32;
  localparam int SW     = 2 * N_BITS - 1;
  localparam int FLUSH  = pma_pkg::n_stages(N_BITS, 2) - 1;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              in_valid, in_ready, in_last;
  logic [N_BITS-1:0] x, y;
  logic              busy, result_valid;
  logic [SW-1:0]     result;
  int                checks = 0, failures = 0;

  pma_top dut (.clk, .rst_n, .in_valid, .in_ready, .in_last, .x, .y,
               .busy, .result_valid, .result);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_flush = 0, n_gap = 0, n_b2b = 0, n_neg = 0, n_wrap = 0, n_refused = 0;

  function automatic logic [N_BITS-1:0] pick(input int vec);
    int sel;
    if (vec == 3) return {1'b1, {(N_BITS-1){1'b0}}};            // -1: drives the sum past +1
    sel = $urandom_range(0, 9);
    unique case (sel)
      0:       return {1'b1, {(N_BITS-1){1'b0}}};
      1:       return {1'b0, {(N_BITS-1){1'b1}}};
      default: return N_BITS'($urandom);
    endcase
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic signed [127:0] ref_sum, px, py;
    logic [SW-1:0]       want;
    int                  m, sent, gaps, t_first, cyc, gap_pct;
    logic                saw_big;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_last  = 1'b0;
    x        = '0;
    y        = '0;
    cyc      = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!result_valid && !busy && in_ready, "idle after reset");

    for (int vec = 0; vec < 40; vec++) begin
      m = (vec == 0) ? 1 : (vec % 4 == 1) ? 20 : $urandom_range(1, 40);
      gap_pct = (vec % 3 == 0) ? 0 : 30;
      // Idle time before the vector, except for back-to-back ones.
      if (vec % 5 != 4) repeat ($urandom_range(1, 4)) @(negedge clk);
      else if (vec > 0) n_b2b++;
      ref_sum = '0;
      sent    = 0;
      gaps    = 0;
      t_first = -1;
      saw_big = 1'b0;
      while (sent < m) begin
        if (sent > 0 && $urandom_range(0, 99) < gap_pct) begin
          in_valid = 1'b0;
          gaps++;
        end else begin
          in_valid = 1'b1;
          x = pick(vec);
          y = pick(vec);
          in_last = (sent == m - 1);
        end
        #1;
        check(in_ready, "in_ready while sending");
        if (in_valid) begin
          if (t_first < 0) t_first = cyc;
          px = 128'($signed(x));
          py = 128'($signed(y));
          if (x[N_BITS-1] || y[N_BITS-1]) n_neg++;
          ref_sum = ref_sum + px * py;
          sent++;
        end
        @(negedge clk);
        cyc++;
      end
      n_gap += gaps;
      in_valid = 1'b0;
      in_last  = 1'b0;
      // A sum outside [-1, 1): |ref_sum| >= 2^(2n-2).
      if (ref_sum >= (128'sd1 <<< (SW - 1)) || ref_sum < -(128'sd1 <<< (SW - 1))) n_wrap++;
      want = ref_sum[SW-1:0];
      // Flush: in_ready low; an offered pair is refused.
      for (int f = 0; f < FLUSH; f++) begin
        check(!result_valid && busy && !in_ready, "flush status");
        if (f == 2) begin
          in_valid = 1'b1;
          x = '1;
          y = '1;
          #1;
          if (!in_ready) n_refused++;
          in_valid = 1'b0;
        end
        @(negedge clk);
        cyc++;
      end
      n_flush++;
      check(result_valid, "result_valid after the flush");
      check(cyc - t_first == m + gaps + FLUSH, $sformatf("operation time %0d, expected M+gaps+N-1 = %0d", cyc - t_first, m + gaps + FLUSH));
      checks++;
      if (result !== want) begin
        failures++;
        $display("FAIL vector %0d (M=%0d): result %h want %h", vec, m, result, want);
      end
      if (vec % 5 != 3) begin
        @(negedge clk);
        cyc++;
        check(result_valid && result === want, "result held while idle");
      end
    end

    $display("flushes=%0d gaps=%0d back_to_back=%0d negative_pairs=%0d wrapped_sums=%0d refused_offers=%0d",
             n_flush, n_gap, n_b2b, n_neg, n_wrap, n_refused);
    check(n_flush > 0, "no flush happened");
    check(n_gap > 0, "no gap inside a vector happened");
    check(n_b2b > 0, "no back-to-back vector happened");
    check(n_neg > 0, "no negative operand was applied");
    check(n_wrap > 0, "no sum wrapped");
    check(n_refused > 0, "no offer was refused during a flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
