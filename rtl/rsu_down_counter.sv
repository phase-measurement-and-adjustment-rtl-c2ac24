// rsu_down_counter: "Counter 1" of the random sampling unit.
//
// LOAD copies the desired sample size into the counter; every clock edge
// with EN set and the count not yet zero decrements it by one. zero_n is
// the active-low ZERO output: it goes low once all trials are used up, and
// the unit then stops sampling. LOAD wins over EN. Function, port names and
// the 16-bit width come from the document; the asynchronous active-low
// reset (to zero, i.e. "finished") is this design's choice.
`timescale 1ps/1ps
module rsu_down_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic         zero_n,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                q <= '0;
    else if (load)             q <= d;
    else if (en && q != '0)    q <= q - 1'b1;
  end

  assign zero_n = (q != '0);
endmodule
