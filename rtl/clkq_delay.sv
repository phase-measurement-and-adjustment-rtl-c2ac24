// clkq_delay: behavioural model of the fixed delay element that delays the
// transmit clock by one clock-to-Q time of the launch flip-flop before it
// reaches the align multiplexer, so that the clock pattern sent during
// alignment leaves the transmitter with the same timing as launched data.
// Not synthesizable: the real element is a matched cell chain.
//
// dout follows din after DELAY_PS picoseconds (transport delay). The
// element and its purpose are from the document; the 100 ps value is this
// design's choice.
`timescale 1ps/1ps
module clkq_delay #(
  parameter int unsigned DELAY_PS = 100
) (
  input  logic din,
  output logic dout
);
  initial dout = 1'b0;

  // One process per input edge keeps every edge, however close.
  always @(posedge din or negedge din) begin
    automatic logic        v = din;
    automatic int unsigned d = DELAY_PS;
    fork
      begin #(d) dout = v; end
    join_none
  end
endmodule
