// ring_oscillator: behavioural model of the ring oscillator with ring
// length control used as the random clock source. It is not synthesizable:
// a real ring is an odd loop of inverters whose delay depends on process,
// voltage and temperature.
//
// While enable is high, rand_clk toggles every (BASE_STAGES + 2*len_sel)
// stage delays, i.e. the ring length control switches in two more stages
// per step of len_sel. Each half period also gets an extra delay drawn
// uniformly from 0..JITTER_PS, standing in for the erratic behaviour of a
// free-running ring that the document relies on. The default spread covers
// two length steps (four stages), so edge times are not confined to a grid
// of the step size; with a narrower spread and a step that divides the
// measured signal's period, samples bunch at some phases and X/n is biased
// by several tenths of a percent. len_sel is read at every
// edge, so a new value from the LFSR changes the next half period. With
// enable low the output rests low.
//
// The document gives the structure (LFSR bits into a ring length control
// inside a ring oscillator); stage count, stage delay, select width and the
// jitter figure are this design's choices.
`timescale 1ps/1ps
module ring_oscillator #(
  parameter int unsigned SEL_W       = 3,
  parameter int unsigned BASE_STAGES = 13,
  parameter int unsigned STAGE_PS    = 40,
  parameter int unsigned JITTER_PS   = 160
) (
  input  logic             enable,
  input  logic [SEL_W-1:0] len_sel,
  output logic             rand_clk
);
  int unsigned half_ps;

  initial begin
    rand_clk = 1'b0;
    forever begin
      if (!enable) begin
        rand_clk = 1'b0;
        @(posedge enable);
      end
      half_ps = (BASE_STAGES + 2 * int'(len_sel)) * STAGE_PS
                + $urandom_range(JITTER_PS, 0);
      #(half_ps);
      if (enable) rand_clk = ~rand_clk;
    end
  end
endmodule
