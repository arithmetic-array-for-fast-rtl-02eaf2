// pma_top: pipelined macrocellular array (PMA) for the inner product
// S = sum_{p=1..M} X_p * Y_p of two vectors of N_BITS-bit two's complement
// fractions, with the result in 2*N_BITS-1 bit two's complement.
//
// The array (pma_array) evaluates one step S_p = S_{p-1} + X_p*Y_p per clock
// from 2x2-bit macrocells and a row of additive cells, and is pipelined
// every K cell levels with flip-flops on the additive connections only.
// The sequencer (pma_ctrl) feeds the M pairs, then the N-1 zero pairs
// (N = ceil(2*ceil(N_BITS/2)/K) + 1) that empty the pipe, and flags the
// result. A vector sent without gaps needs M + N - 1 clock periods; the
// clock period is set by K cell delays plus one flip-flop.
//
// Interface: offer pairs with in_valid/in_ready, mark the last with
// in_last. result_valid rises when result holds S and stays high until the
// next vector's first pair is accepted. Gaps in the stream are allowed.
// Sums outside [-1, 1) wrap modulo 2. Defaults N_BITS = 32 and K = 2 are the
// operand width and the pipelining degree found most efficient for it.
module pma_top
  import pma_pkg::*;
#(
  parameter int N_BITS = 32,
  parameter int K      = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic                in_last,
  input  logic [N_BITS-1:0]   x,
  input  logic [N_BITS-1:0]   y,
  output logic                busy,
  output logic                result_valid,
  output logic [2*N_BITS-2:0] result
);

  localparam int FLUSH = n_stages(N_BITS, K) - 1;

  logic              acc_clear;
  logic [N_BITS-1:0] arr_x, arr_y;

  pma_ctrl #(.N_BITS(N_BITS), .FLUSH(FLUSH)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_last, .x, .y,
    .acc_clear, .arr_x, .arr_y,
    .busy, .result_valid
  );

  pma_array #(.N_BITS(N_BITS), .K(K)) u_array (
    .clk, .rst_n,
    .acc_clear,
    .x(arr_x),
    .y(arr_y),
    .s(result)
  );

endmodule
