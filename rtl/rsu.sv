// rsu: random sampling unit for relative phase measurement.
//
// Signal 1 and Signal 2 are captured together on every edge of a random
// clock whose edges are independent of the signals, so each capture is a
// Bernoulli trial that lands in region A/B/C/D of the signal cycle with a
// probability equal to that region's share of the cycle. Counter 1 counts
// down the n trials of one measurement; Counter 2 counts how many of them
// matched region_code. X/n then estimates the region's share of the cycle,
// e.g. for region A (10) the lag of Signal 2 behind Signal 1 as a fraction
// of a cycle.
//
// Operation (all on rand_clk):
//  * sample, signal1 and signal2 each pass through SYNC_STAGES cascaded
//    flip-flops so that a metastable capture settles before use.
//  * Any transition of the synchronised sample line gives a one-cycle reset
//    pulse: Counter 1 loads n, Counter 2 clears.
//  * Each later edge while Counter 1 is non-zero is one trial: Counter 1
//    decrements, and Counter 2 increments if the synchronised pair equals
//    region_code.
//  * sample_ready is high when Counter 1 is zero; count_x is then stable.
// Timing: after a toggle of sample, the reset pulse is high in the cycle
// after the (SYNC_STAGES)th rand_clk edge, sample_ready falls at edge
// SYNC_STAGES+1, the n trials take edges SYNC_STAGES+2 .. SYNC_STAGES+1+n,
// and sample_ready rises at the last of them.
//
// Structure, counters, reset pulse, region-code match and Sample Ready
// follow the document's block diagram. The extra flip-flop holding the
// previous synchronised sample value (for the transition detect), the
// asynchronous reset and n >= 1 are this design's choices.
`timescale 1ps/1ps
module rsu
  import rsu_pkg::*;
#(
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic             rand_clk,
  input  logic             rst_n,
  input  logic             sample,
  input  logic             signal1,
  input  logic             signal2,
  input  region_e          region_code,
  input  logic [CNT_W-1:0] n,
  output logic             sample_ready,
  output logic [CNT_W-1:0] count_x
);
  logic sample_s, sample_prev, sig1_s, sig2_s;
  logic reset_pulse, zero_n, match, trial;

  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_sample (.clk(rand_clk), .rst_n, .d(sample),  .q(sample_s));
  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_sig1   (.clk(rand_clk), .rst_n, .d(signal1), .q(sig1_s));
  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_sig2   (.clk(rand_clk), .rst_n, .d(signal2), .q(sig2_s));

  // Transition detect on the synchronised Sample line.
  always_ff @(posedge rand_clk or negedge rst_n) begin
    if (!rst_n) sample_prev <= 1'b0;
    else        sample_prev <= sample_s;
  end

  always_comb begin
    reset_pulse = sample_s ^ sample_prev;
    trial       = zero_n && !reset_pulse;
    match       = ({sig1_s, sig2_s} == region_code);
  end

  rsu_down_counter #(.W(CNT_W)) u_counter1 (
    .clk(rand_clk), .rst_n, .load(reset_pulse), .en(trial), .d(n),
    .zero_n, .q()
  );

  rsu_event_counter #(.W(CNT_W)) u_counter2 (
    .clk(rand_clk), .rst_n, .clear(reset_pulse), .en(trial && match), .q(count_x)
  );

  assign sample_ready = !zero_n;

  // A measurement of zero trials would never lower sample_ready.
  assert property (@(posedge rand_clk) disable iff (!rst_n) reset_pulse |-> n != '0)
    else $error("rsu: sample size n must be at least 1");
endmodule
