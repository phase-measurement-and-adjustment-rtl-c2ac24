// phase_align_link: closed-loop clock-to-data alignment of one signalling
// link by random-sampling phase measurement (top level).
//
// Transmitter: tx_launch sends Data In, or, while align is high, the
// transmit clock (delayed by one clock-to-Q time in clkq_delay) onto the
// line. Receiver: the received clock passes through the programmable
// delay_line; the delayed clock captures the line in rx_capture. During
// alignment both the line and the delayed clock carry the same-frequency
// clock pattern; the random sampling unit (rsu), clocked by the on-chip
// random clock (random_clock_gen), counts how often the pair reads 10
// (line high, delayed clock still low), which measures the lag of the
// delayed clock behind the data. The control unit (phase_ctrl) turns that
// count into a tap setting that brings the lag to target_phase.
//
// The line and the clock buffers have no logic and are outside: line_out
// leaves for the line, line_in comes back from it, clk_tx and clk_rx are
// the buffered clocks at each end. sys_clk runs the control unit and the
// LFSR of the random clock. rst_n is asynchronous, active low.
//
// Block structure and data flow follow the document's system diagram;
// port-level choices are described in each block. The delay elements and
// the ring oscillator are behavioural models, so this top is for
// simulation; the logic blocks synthesize on their own.
`timescale 1ps/1ps
module phase_align_link
  import rsu_pkg::*;
#(
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned NTAPS    = 64,
  parameter int unsigned TAP_PS   = 33,
  parameter int unsigned CLKQ_PS  = 100
) (
  input  logic                     sys_clk,
  input  logic                     rst_n,
  input  logic                     clk_tx,
  input  logic                     clk_rx,
  input  logic                     align,
  input  logic                     data_in,
  output logic                     line_out,
  input  logic                     line_in,
  output logic                     data_out,
  input  logic [CNT_W-1:0]         n_coarse,
  input  logic [CNT_W-1:0]         n_fine,
  input  logic [PHASE_W-1:0]       target_phase,
  input  logic [CYC_W-1:0]         cycle_taps,
  output logic [$clog2(NTAPS)-1:0] tap,
  output logic                     done,
  output logic [CNT_W-1:0]         last_x
);
  logic clk_pat, clk_rx_dly, rand_clk;
  logic sample, sample_ready;
  logic [CNT_W-1:0] n, count_x;

  // Transmitter side.
  clkq_delay #(.DELAY_PS(CLKQ_PS)) u_clkq (.din(clk_tx), .dout(clk_pat));
  tx_launch u_tx (.clk(clk_tx), .clk_pat, .align, .data_in, .line_out);

  // Receiver side.
  delay_line #(.NTAPS(NTAPS), .TAP_PS(TAP_PS)) u_delay (
    .din(clk_rx), .tap, .dout(clk_rx_dly)
  );
  rx_capture u_rx (.clk(clk_rx_dly), .d(line_in), .q(data_out));

  // Phase measurement with the RSU.
  random_clock_gen u_rclk (.sys_clk, .rst_n, .rand_clk);

  rsu #(.CNT_W(CNT_W)) u_rsu (
    .rand_clk, .rst_n, .sample, .signal1(line_in), .signal2(clk_rx_dly),
    .region_code(REGION_A), .n, .sample_ready, .count_x
  );

  phase_ctrl #(.CNT_W(CNT_W), .NTAPS(NTAPS), .MAX_PASSES(4)) u_ctrl (
    .clk(sys_clk), .rst_n, .align, .n_coarse, .n_fine, .target_phase,
    .cycle_taps, .sample, .n, .sample_ready, .count_x, .tap, .done,
    .last_x, .passes()
  );
endmodule
