// phase_ctrl: control unit of the alignment loop.
//
// While align is high it runs up to MAX_PASSES measurement passes and
// then raises done; tap holds its value after align falls. One pass:
//  1. choose the sample size (n_coarse for the first pass, n_fine after,
//     so that early corrections are quick and the last ones accurate),
//     toggle sample to start the random sampling unit;
//  2. wait for sample_ready (synchronised to clk) to fall and rise again,
//     then read the count X;
//  3. work out the correction in taps,
//        delta = round((target_phase - X/n) * cycle_taps),
//     as signed fixed point: err = target_phase*n - X*2^16 (Q.16 counts),
//     prod = err * cycle_taps (Q.24), |prod| / n on a sequential divider,
//     round half up on the magnitude;
//  4. move tap by delta, clamped to 0 .. NTAPS-1. A later pass whose delta
//     is zero ends the calibration early.
// Rounding to the nearest tap keeps the residual error within half a tap.
//
// Interface: target_phase is the wanted lag of the receiver clock behind
// the data line as a Q0.16 fraction of a cycle (0x4000 = 90 deg);
// cycle_taps is the cycle time divided by the tap step, Q8.8 (500 MHz and
// 33 ps give 60.6). X/n is read as the lag itself, which holds while the
// lag is shorter than the high time of the pattern. The sample size must
// be large enough that sample_ready stays low for at least three clk
// cycles. align is taken to be synchronous to clk.
//
// The document gives the function (use the measured phase to set the
// delay-line tap with least error, coarse then fine samples); the
// pass sequence, fixed-point formats, rounding, clamping and handshake
// are this design's choices.
`timescale 1ps/1ps
module phase_ctrl
  import rsu_pkg::*;
#(
  parameter int unsigned CNT_W      = 16,
  parameter int unsigned NTAPS      = 64,
  parameter int unsigned MAX_PASSES = 4,
  parameter int unsigned INIT_TAP   = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     align,
  input  logic [CNT_W-1:0]         n_coarse,
  input  logic [CNT_W-1:0]         n_fine,
  input  logic [PHASE_W-1:0]       target_phase,
  input  logic [CYC_W-1:0]         cycle_taps,
  output logic                     sample,
  output logic [CNT_W-1:0]         n,
  input  logic                     sample_ready,
  input  logic [CNT_W-1:0]         count_x,
  output logic [$clog2(NTAPS)-1:0] tap,
  output logic                     done,
  output logic [CNT_W-1:0]         last_x,
  output logic [$clog2(MAX_PASSES+1)-1:0] passes
);
  localparam int unsigned TAP_W  = $clog2(NTAPS);
  localparam int unsigned FRAC   = PHASE_W + CYC_FRAC;           // 24
  localparam int unsigned ERR_W  = CNT_W + PHASE_W + 1;          // signed
  localparam int unsigned MAG_W  = CNT_W + PHASE_W + CYC_W;      // |prod|
  localparam int unsigned PASS_W = $clog2(MAX_PASSES+1);

  typedef enum logic [2:0] {
    S_IDLE, S_START, S_WAIT_LOW, S_WAIT_HIGH, S_CALC, S_DIV, S_APPLY, S_DONE
  } state_e;

  state_e state;
  logic   ready_s, align_q;
  logic   neg;
  logic signed [ERR_W-1:0]   err;
  logic        [MAG_W-1:0]   mag;
  logic                      div_start, div_done;
  logic        [MAG_W-1:0]   quo;
  logic        [MAG_W-FRAC:0] steps;
  logic signed [MAG_W-FRAC+2:0] new_tap;

  sync_ff #(.STAGES(2)) u_sync_ready (.clk, .rst_n, .d(sample_ready), .q(ready_s));

  seq_divider #(.DW(MAG_W), .VW(CNT_W)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(mag), .divisor(n),
    .busy(), .done(div_done), .quotient(quo)
  );

  // Correction arithmetic on the latched count.
  always_comb begin
    logic signed [ERR_W+CYC_W-1:0] prod;
    err   = $signed({1'b0, (ERR_W-1)'(target_phase * n)})
          - $signed({1'b0, last_x, {PHASE_W{1'b0}}});
    prod  = err * $signed({1'b0, cycle_taps});
    neg   = prod < 0;
    mag   = MAG_W'(neg ? -prod : prod);
    steps = (MAG_W-FRAC+1)'((quo + (MAG_W'(1) << (FRAC-1))) >> FRAC);
    new_tap = neg ? $signed((MAG_W-FRAC+3)'(tap)) - $signed({2'b00, steps})
                  : $signed((MAG_W-FRAC+3)'(tap)) + $signed({2'b00, steps});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; align_q <= 1'b0; sample <= 1'b0; n <= '0;
      tap <= TAP_W'(INIT_TAP); done <= 1'b0; last_x <= '0; passes <= '0;
      div_start <= 1'b0;
    end else begin
      align_q   <= align;
      div_start <= 1'b0;
      if (!align) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: if (!align_q) begin        // rising edge of align
            done   <= 1'b0;
            passes <= '0;
            state  <= S_START;
          end
          S_START: begin
            n      <= (passes == 0) ? n_coarse : n_fine;
            sample <= ~sample;
            state  <= S_WAIT_LOW;
          end
          S_WAIT_LOW:  if (!ready_s) state <= S_WAIT_HIGH;
          S_WAIT_HIGH: if (ready_s) begin
            last_x <= count_x;
            state  <= S_CALC;
          end
          S_CALC: begin
            div_start <= 1'b1;
            state     <= S_DIV;
          end
          S_DIV: if (div_done) state <= S_APPLY;
          S_APPLY: begin
            if (new_tap < 0)                  tap <= '0;
            else if (new_tap > $signed((MAG_W-FRAC+3)'(NTAPS-1))) tap <= TAP_W'(NTAPS - 1);
            else                              tap <= TAP_W'(new_tap);
            passes <= passes + 1'b1;
            if ((passes != 0 && steps == 0) || passes + 1 >= PASS_W'(MAX_PASSES)) begin
              done  <= 1'b1;
              state <= S_DONE;
            end else begin
              state <= S_START;
            end
          end
          S_DONE: ;
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
