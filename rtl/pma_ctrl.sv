// pma_ctrl: zero-flush sequencer of the inner-product array.
//
// The array needs M operand pairs followed by N-1 zero pairs before its
// accumulator holds S = sum X_p*Y_p. This block turns a valid/ready stream
// into that sequence. A pair is accepted when in_valid and in_ready are both
// high, and goes to the array in the same cycle. A cycle without an accepted
// pair drives a zero pair, which adds nothing to the sum. The first pair of
// a vector raises acc_clear, so the sum starts from S_0 = 0. After the pair
// marked in_last, in_ready stays low for FLUSH cycles of zero pairs. Then
// result_valid rises and stays high until the next vector starts. From the
// first pair to result_valid, a vector of M pairs sent without gaps takes
// M + FLUSH clock periods, the operation time the array is designed for.
// The handshake and the in_last marker are this design's own; the zero
// flush is the array's. Asynchronous active-low reset.
module pma_ctrl
  import pma_pkg::*;
#(
  parameter int N_BITS = 32,
  parameter int FLUSH  = n_stages(32, 2) - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // operand stream
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_last,
  input  logic [N_BITS-1:0] x,
  input  logic [N_BITS-1:0] y,
  // to the array
  output logic              acc_clear,
  output logic [N_BITS-1:0] arr_x,
  output logic [N_BITS-1:0] arr_y,
  // status
  output logic              busy,
  output logic              result_valid
);

  typedef enum logic [1:0] {
    S_IDLE,    // no result yet
    S_RUN,     // accepting the pairs of a vector
    S_FLUSH,   // feeding zero pairs
    S_DONE     // accumulator holds the result
  } state_e;

  localparam int CW = (FLUSH > 1) ? $clog2(FLUSH) : 1;

  state_e        state_q;
  logic [CW-1:0] cnt_q;
  logic          accept;

  initial begin
    assert (FLUSH >= 1) else $error("pma_ctrl: FLUSH must be at least 1");
  end

  assign in_ready     = (state_q != S_FLUSH);
  assign accept       = in_valid && in_ready;
  assign acc_clear    = accept && (state_q != S_RUN);
  assign arr_x        = accept ? x : '0;
  assign arr_y        = accept ? y : '0;
  assign busy         = (state_q == S_RUN) || (state_q == S_FLUSH);
  assign result_valid = (state_q == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE, S_RUN: begin
          if (accept) begin
            if (in_last) begin
              state_q <= S_FLUSH;
              cnt_q   <= CW'(FLUSH - 1);
            end else begin
              state_q <= S_RUN;
            end
          end
        end
        S_FLUSH: begin
          if (cnt_q == '0) state_q <= S_DONE;
          else             cnt_q   <= cnt_q - 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // No pair may enter while the pipe is being emptied.
  a_no_accept_in_flush: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == S_FLUSH |-> !accept);

endmodule
