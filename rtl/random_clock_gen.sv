// random_clock_gen: digital random clock oscillator.
//
// An LFSR clocked by the system clock produces a new pseudo-random word
// every system cycle; SEL_W of its bits drive the ring length control of a
// ring oscillator, so the length of the ring, and with it the time to the
// next edge of rand_clk, keeps changing in a way unrelated to the signals
// being measured. The ring runs while rst_n is high. The average
// frequency does not matter for the measurement, only that rand_clk edges
// fall at all points of the measured signals' cycle with equal chance.
//
// Structure follows the document; which LFSR bits are used (the low SEL_W)
// and all sizes are this design's choices. The ring itself is a
// behavioural model, so this block is for simulation.
`timescale 1ps/1ps
module random_clock_gen #(
  parameter int unsigned LFSR_W = 16,
  parameter int unsigned SEL_W  = 3
) (
  input  logic sys_clk,
  input  logic rst_n,
  output logic rand_clk
);
  logic [LFSR_W-1:0] prn;

  lfsr #(.W(LFSR_W)) u_lfsr (.clk(sys_clk), .rst_n, .q(prn));

  ring_oscillator #(.SEL_W(SEL_W)) u_ring (
    .enable(rst_n), .len_sel(prn[SEL_W-1:0]), .rand_clk
  );
endmodule
