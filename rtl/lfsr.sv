// lfsr: linear feedback shift register that produces the pseudo-random
// numbers steering the ring length control of the random clock oscillator.
//
// Fibonacci form, shifting left by one bit per clock, feedback taken from
// the bits of a maximal-length polynomial, so the state runs through all
// 2^W - 1 non-zero values. The document names the LFSR and its role only;
// the 16-bit width, the polynomial x^16 + x^14 + x^13 + x^11 + 1 and the
// non-zero reset seed are this design's choices. Other widths need a
// matching TAPS mask (bit i set = bit i of the state feeds back).
`timescale 1ps/1ps
module lfsr #(
  parameter int unsigned   W    = 16,
  parameter logic [W-1:0]  TAPS = 16'hB400,  // bits 15, 13, 12, 10
  parameter logic [W-1:0]  SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] q
);
  logic feedback;

  always_comb feedback = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= SEED;
    else        q <= {q[W-2:0], feedback};
  end

  initial assert (SEED != '0) else $error("lfsr: seed must be non-zero");
endmodule
