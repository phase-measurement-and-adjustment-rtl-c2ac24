// delay_line: behavioural model of the programmable delay line in the
// receiver clock path. Not synthesizable: the real part is a chain of
// delay cells with a tap multiplexer.
//
// dout follows din delayed by tap * TAP_PS picoseconds (transport delay,
// so every edge passes). Tap 0 is the shortest path and is taken here as
// zero extra delay. The 33 ps step is the document's figure for its
// target technology; the number of taps (64, a little over one 500 MHz
// cycle at 33 ps) is this design's choice.
`timescale 1ps/1ps
module delay_line #(
  parameter int unsigned NTAPS  = 64,
  parameter int unsigned TAP_PS = 33
) (
  input  logic                     din,
  input  logic [$clog2(NTAPS)-1:0] tap,
  output logic                     dout
);
  initial dout = 1'b0;

  // Each input edge is carried by its own process, so edges closer together
  // than the delay all arrive.
  always @(posedge din or negedge din) begin
    automatic logic        v = din;
    automatic int unsigned d = int'(tap) * TAP_PS;
    fork
      begin #(d) dout = v; end
    join_none
  end
endmodule
