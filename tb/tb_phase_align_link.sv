// tb_phase_align_link: end-to-end test of the alignment link at its
// default parameters (16-bit counters, 64 taps of 33 ps).
//
// Environment: 500 MHz link clock; the clock reaches the receiver 400 ps
// after the transmitter; the line takes 200 ps, later 100 ps. With the
// 100 ps clock-to-Q matching delay the receiver clock then lags the data
// by 100 ps (later 200 ps) before correction. Target is 90 deg (500 ps).
//
// Sequence:
//  1. data mode: a PRBS on Data In must come out of Data Out unchanged
//     with a fixed latency;
//  2. align: coarse pass (n = 1024) then fine passes (n = 65535) must end
//     at tap 12 (lag 496 ps), i.e. within half a tap of 500 ps, with the
//     last measured X/n within 0.01 of 0.25;
//  3. the line shortens to 100 ps; align again must back off to tap 9;
//  4. data mode again;
//  5. the line edges get a zero-mean jitter of +-90 ps; align again must
//     end at tap 9 or a neighbour. The jitter averages out of the mean of
//     X/n, but it widens its spread (about 0.003 of a cycle here against
//     0.001 without), and tap 9 is only 13.5 ps better than tap 10.
// The expected taps are worked out from the delays above. Each mechanism
// is counted: clock pattern on the line, coarse and fine passes,
// completed measurements, tap increases and decreases, data transfers.
// A mechanism that never happened counts as a failure.
`timescale 1ps/1ps
module tb_phase_align_link;
  import rsu_pkg::*;
  localparam int T_PS = 2000, BUF_PS = 400, CLKQ_PS = 100, TAP_PS = 33;

  logic sys_clk = 0, rst_n = 1, clk_tx = 0, clk_rx = 0, align = 0, data_in = 0;
  logic line_out, line_in, data_out, done;
  logic [15:0] n_coarse = 16'd1024, n_fine = 16'd65535;
  logic [15:0] target_phase = 16'h4000, cycle_taps = 16'd15515, last_x;
  logic [5:0] tap;
  int unsigned line_ps = 200, jitter_ps = 0;
  int checks = 0, failures = 0;
  int n_pattern = 0, n_coarse_pass = 0, n_fine_pass = 0, n_meas = 0;
  int n_up = 0, n_down = 0, n_data = 0, n_jitter = 0;

  phase_align_link dut (.*);
  tb_line_model u_line (.din(line_out), .delay_ps(line_ps), .jitter_ps(jitter_ps), .dout(line_in));

  always #1500 sys_clk = ~sys_clk;
  always #(T_PS / 2) clk_tx = ~clk_tx;
  initial begin
    #(BUF_PS);
    forever #(T_PS / 2) clk_rx = ~clk_rx;
  end

  initial begin
    #20_000_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mechanism counters.
  always @(dut.sample) if (rst_n) begin
    #1;
    if (dut.n == n_coarse) n_coarse_pass++;
    else if (dut.n == n_fine) n_fine_pass++;
  end
  always @(posedge dut.sample_ready) if (rst_n) n_meas++;
  logic [5:0] tap_q = '0;
  always @(tap) begin
    if (tap > tap_q) n_up++;
    else if (tap < tap_q) n_down++;
    tap_q = tap;
  end
  always @(posedge clk_tx) begin
    #(CLKQ_PS + 10);
    if (align && rst_n && line_out == 1'b1) n_pattern++;
  end

  // PRBS on Data In, one bit per transmit clock.
  logic [6:0] prbs = 7'h5A;
  logic hist_in [$];
  always @(posedge clk_tx) begin
    #300;
    prbs = {prbs[5:0], prbs[6] ^ prbs[5]};
    data_in = prbs[0];
  end

  task automatic data_mode_check();
    logic got [$];
    logic sent [$];
    int lag_found;
    repeat (10) @(posedge clk_tx);
    for (int i = 0; i < 200; i++) begin
      @(posedge clk_tx); #1;
      sent.push_back(data_in);       // value the launch flop just took... before update
      #1500;
      got.push_back(data_out);
    end
    lag_found = -1;
    for (int lag = 0; lag < 4 && lag_found < 0; lag++) begin
      bit ok = 1;
      for (int i = 8; i < 200; i++) if (got[i] !== sent[i - lag]) ok = 0;
      if (ok) lag_found = lag;
    end
    check(lag_found >= 0, "data passes the link unchanged");
    if (lag_found >= 0) n_data++;
  endtask

  task automatic align_check(input int exp_tap, input int tol = 0);
    int lag;
    real p;
    @(posedge sys_clk) align = 1;
    @(posedge sys_clk); @(posedge sys_clk); #1;
    wait (done);
    lag = BUF_PS + int'(tap) * TAP_PS - CLKQ_PS - int'(line_ps);
    p = real'(last_x) / real'(n_fine);
    $display("aligned: tap=%0d lag=%0d ps X/n=%f at %0t", tap, lag, p, $realtime);
    check(int'(tap) >= exp_tap - tol && int'(tap) <= exp_tap + tol,
          $sformatf("tap %0d expected %0d +- %0d", tap, exp_tap, tol));
    check(lag >= T_PS / 4 - TAP_PS / 2 - tol * TAP_PS && lag <= T_PS / 4 + TAP_PS / 2 + tol * TAP_PS,
          "residual within half a tap (plus tolerance)");
    check(p > 0.24 && p < 0.26, "measured phase near 90 deg");
    @(posedge sys_clk) align = 0;
  endtask

  initial begin
    #1 rst_n = 0;
    #20000 rst_n = 1;
    data_mode_check();
    align_check(12);
    data_mode_check();
    line_ps = 100;
    repeat (10) @(posedge clk_tx);
    align_check(9);
    data_mode_check();
    jitter_ps = 90;
    align_check(9, 1);
    n_jitter++;
    jitter_ps = 0;
    $display("mechanisms: pattern=%0d coarse=%0d fine=%0d measurements=%0d up=%0d down=%0d data=%0d jittered=%0d",
             n_pattern, n_coarse_pass, n_fine_pass, n_meas, n_up, n_down, n_data, n_jitter);
    check(n_pattern > 0, "clock pattern sent");
    check(n_coarse_pass > 0, "coarse pass");
    check(n_fine_pass > 0, "fine pass");
    check(n_meas >= n_coarse_pass + n_fine_pass, "measurements completed");
    check(n_up > 0, "tap increased");
    check(n_down > 0, "tap decreased");
    check(n_data > 0, "data transferred");
    check(n_jitter > 0, "alignment under jitter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
