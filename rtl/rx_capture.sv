// rx_capture: receiver data flip-flop. Samples the received line on the
// rising edge of the receiver clock after the programmable delay line and
// gives Data Out one clock later. The alignment loop places that edge at
// the wanted phase of the data eye. As in the document's system diagram.
`timescale 1ps/1ps
module rx_capture (
  input  logic clk,
  input  logic d,
  output logic q
);
  always_ff @(posedge clk) q <= d;
endmodule
