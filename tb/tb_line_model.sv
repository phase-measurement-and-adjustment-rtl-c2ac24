// tb_line_model: behavioural model of the transmission line (or of any
// wire with a flight time) for the testbenches. Every edge of din reaches
// dout delay_ps picoseconds later, plus a zero-mean random jitter drawn
// uniformly from -jitter_ps..+jitter_ps for each edge. Both may be changed
// while running. Jitter must stay below half the shortest pulse so that
// edges keep their order, and must not exceed the delay.
`timescale 1ps/1ps
module tb_line_model (
  input  logic        din,
  input  int unsigned delay_ps,
  input  int unsigned jitter_ps,
  output logic        dout
);
  initial dout = 1'b0;
  always @(posedge din or negedge din) begin
    automatic logic        v = din;
    automatic int unsigned d;
    assert (jitter_ps <= delay_ps) else $error("line jitter exceeds its delay");
    d = delay_ps + $urandom_range(2 * jitter_ps, 0) - jitter_ps;
    fork
      begin #(d) dout = v; end
    join_none
  end
endmodule
