// pma_pipe_reg: memory element on an additive connection of the array.
//
// Delays a W-bit bundle by DEPTH clock cycles: one flip-flop per pipeline
// cut the connection crosses. DEPTH = 0 is a plain wire, so the array can
// place this element on every connection and let the cut geometry decide.
// The published cost model counts level-sensitive latches of four gates;
// this design uses edge-triggered flip-flops with an asynchronous
// active-low reset to zero instead. With DEPTH = 0, clk and rst_n are
// unused by design (lint reports them as unused signals).
module pma_pipe_reg #(
  parameter int W     = 3,
  parameter int DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage_q [DEPTH];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) stage_q[i] <= '0;
      end else begin
        stage_q[0] <= d;
        for (int i = 1; i < DEPTH; i++) stage_q[i] <= stage_q[i-1];
      end
    end

    assign q = stage_q[DEPTH-1];
  end

endmodule
