// edge_sync: brings an asynchronous level into the clk domain and flags its edges.
//
// A chain of STAGES flip-flops resynchronises `din`; one further register gives the previous
// sampled value, and `rise`/`fall` are one-cycle pulses on a 0->1 or 1->0 change of the
// synchronised level. Latency from a change of `din` to the pulse is STAGES to STAGES+1 cycles.
// Used wherever a signal of another clock (the recovered clock f_out, the divided clock f_div,
// a start-of-packet toggle from the PHY clock) is timed against the reference clock. The
// synchroniser is this design's choice; the document does not say how the domains are crossed.
module edge_sync #(
  parameter int STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic level,
  output logic rise,
  output logic fall
);
  logic [STAGES:0] sh;   // sh[0] is the first synchroniser flop, sh[STAGES] the delayed copy

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh <= '0;
    else        sh <= {sh[STAGES-1:0], din};
  end

  assign level = sh[STAGES-1];
  assign rise  =  sh[STAGES-1] & ~sh[STAGES];
  assign fall  = ~sh[STAGES-1] &  sh[STAGES];
endmodule
