// error_or_tree: joins the error latch outputs of all error detection
// flip-flops (224 by default) into one system error flag.
// Input bit i comes from the endpoint with the i-th smallest timing slack, so
// bit 0 is the most critical path. The tree is built as a balanced binary OR
// of the inputs; beside the OR it carries, per subtree, the index of its
// lowest-numbered (most critical) active input, the left subtree winning.
// Both results are registered once, at the same rising edge at which the error
// latches are cleared, so `err_any`/`err_idx` describe the cycle before.
// Joining the signals with an OR-tree ordered by slack follows the design description;
// reporting the index of the most critical flagged endpoint and the single
// register stage are this design's choices.
`timescale 1ns / 1ps
module error_or_tree #(
  parameter int unsigned N_ERR = 224,
  localparam int unsigned IW   = (N_ERR > 1) ? $clog2(N_ERR) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_ERR-1:0] err_in,
  output logic             err_any,
  output logic [IW-1:0]    err_idx
);

  // Tree stored level by level in a heap: node n has children 2n+1 and 2n+2.
  localparam int unsigned LEAVES = 1 << IW;
  localparam int unsigned NODES  = 2 * LEAVES - 1;

  logic          hit [NODES];
  logic [IW-1:0] idx [NODES];

  always_comb begin
    for (int unsigned l = 0; l < LEAVES; l++) begin
      hit[LEAVES-1+l] = (l < N_ERR) ? err_in[l] : 1'b0;
      idx[LEAVES-1+l] = IW'(l);
    end
    for (int n = int'(LEAVES) - 2; n >= 0; n--) begin
      hit[n] = hit[2*n+1] | hit[2*n+2];
      idx[n] = hit[2*n+1] ? idx[2*n+1] : idx[2*n+2];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_any <= 1'b0;
      err_idx <= '0;
    end else begin
      err_any <= hit[0];
      err_idx <= hit[0] ? idx[0] : '0;
    end
  end

endmodule
