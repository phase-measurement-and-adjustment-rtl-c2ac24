// rsu_pkg: types and constants shared by the random-sampling phase
// measurement blocks.
//
// A trial of the random sampling unit captures two signals at once; the
// pair of captured bits falls into one of four regions of the signal cycle
// (Signal 1 bit first, Signal 2 bit second). The encoding of the regions
// follows the document's timing diagram: A = 10, B = 11, C = 01, D = 00.
// Region A is the stretch where Signal 1 is already high and Signal 2 is
// still low, so its share of the cycle is the lag of Signal 2 behind
// Signal 1. Widths of the phase and cycle-length words are this design's
// choice.
`timescale 1ps/1ps
package rsu_pkg;
  typedef enum logic [1:0] {
    REGION_D = 2'b00,
    REGION_C = 2'b01,
    REGION_A = 2'b10,
    REGION_B = 2'b11
  } region_e;

  // Phase as an unsigned fraction of one cycle, Q0.16 (0x4000 = 90 deg).
  localparam int unsigned PHASE_W = 16;
  // Cycle time measured in delay-line taps, unsigned Q8.8.
  localparam int unsigned CYC_W   = 16;
  localparam int unsigned CYC_FRAC = 8;
endpackage
