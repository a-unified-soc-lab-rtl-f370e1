// reset_sync: reset synchronizer for the platform's external reset.
//
// The external reset arst (active high, asynchronous) is passed through a
// chain of STAGES flip-flops clocked by clk. Asserting arst asserts rst at
// once, without waiting for a clock edge; releasing arst releases rst
// synchronously, STAGES rising clk edges later, so every flip-flop of the
// design leaves reset in the same cycle. That the block synchronizes an
// external asynchronous reset is the platform's; the active-high polarity,
// asynchronous assertion and two stages are this design's choices.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst,  // external asynchronous reset, active high
  output logic rst    // synchronized reset, active high
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or posedge arst) begin
    if (arst) chain <= '1;
    else      chain <= {chain[STAGES-2:0], 1'b0};
  end

  assign rst = chain[STAGES-1];

endmodule
