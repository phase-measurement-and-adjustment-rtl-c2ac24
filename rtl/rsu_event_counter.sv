// rsu_event_counter: "Counter 2" of the random sampling unit.
//
// Counts the trials whose captured state matched the region code. clear
// (the document's RESET input, driven by the reset pulse at the start of
// a measurement) sets it to zero; otherwise it adds one on each clock edge
// with EN set. The 16-bit width is the document's; clear being synchronous
// and having priority over EN, and the asynchronous reset, are this design's
// choices. The count wraps at 2^W, which cannot happen while the number of
// trials is itself a W-bit number.
`timescale 1ps/1ps
module rsu_event_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clear) q <= '0;
    else if (en)    q <= q + 1'b1;
  end
endmodule
