// sync_ff: chain of cascaded flip-flops that lets a value sampled on an
// unrelated clock settle before logic uses it (the document's cure for
// metastability in the random sampling unit).
//
// The input is registered STAGES times on clk; q is the last stage.
// Latency is STAGES clock edges. The reset value (asynchronous, active low)
// is this design's choice.
`timescale 1ps/1ps
module sync_ff #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= '0;
    else        chain <= {chain[STAGES-2:0], d};
  end

  assign q = chain[STAGES-1];
endmodule
