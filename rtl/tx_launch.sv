// tx_launch: transmitter side of the link.
//
// Data In is launched by a flip-flop on the rising edge of the transmit
// clock. The align multiplexer drives the line with that flip-flop's
// output in normal operation and, while align is high, with the clock
// pattern (the transmit clock after the clock-to-Q matching delay), so that
// a signal of known frequency runs down the data line during alignment.
// Structure as in the document's system diagram; which mux input align
// selects when high is inferred from its text ("a pattern of known
// frequency (clock itself in this case) is sent at both data and clock
// lines" during alignment). The clock reaching the multiplexer as data is
// intended.
`timescale 1ps/1ps
module tx_launch (
  input  logic clk,
  input  logic clk_pat,
  input  logic align,
  input  logic data_in,
  output logic line_out
);
  logic data_q;

  always_ff @(posedge clk) data_q <= data_in;

  always_comb line_out = align ? clk_pat : data_q;
endmodule
