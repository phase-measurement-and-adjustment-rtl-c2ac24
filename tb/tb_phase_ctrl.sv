// tb_phase_ctrl: checks the control unit of the alignment loop against a
// model of the link it steers.
//
// The model stands in for the random sampling unit: on each toggle of
// sample it lowers sample_ready, later returns X = round(P * n) and raises
// sample_ready again, where P is the region-A share of the cycle for two
// 50 % duty signals whose lag is d0 + tap * 33 ps in a 2000 ps cycle.
// For each pass the testbench works out, in real arithmetic, the tap the
// unit should move to, round((target - X/n) * cycle_taps) plus the old
// tap, clamped to 0..63, and compares. It also checks: n_coarse on the
// first pass and n_fine after, done at the end, the final tap nearest the
// target, the early stop when a pass needs no correction, the pass limit,
// and that the tap holds once align falls. Scenarios raise the delay,
// lower it, and run into the lower end of the line.
`timescale 1ps/1ps
module tb_phase_ctrl;
  import rsu_pkg::*;
  localparam int CNT_W = 16;
  localparam real T_PS = 2000.0, TAP_PS = 33.0;

  logic clk = 0, rst_n = 0, align = 0;
  logic [CNT_W-1:0] n_coarse = 16'd1024, n_fine = 16'd60000;
  logic [PHASE_W-1:0] target_phase = 16'h4000;
  logic [CYC_W-1:0] cycle_taps = 16'd15515;          // 2000/33 in Q8.8
  logic sample, sample_ready = 1;
  logic [CNT_W-1:0] n, count_x = '0, last_x;
  logic [5:0] tap;
  logic done;
  logic [2:0] passes;
  int checks = 0, failures = 0;
  real d0 = 0.0;
  int pass_no = 0;

  phase_ctrl #(.CNT_W(CNT_W)) dut (.*);

  always #2500 clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real share_a(input real lag);
    real l;
    l = lag - T_PS * $floor(lag / T_PS);
    return (l < T_PS / 2) ? l / T_PS : (T_PS - l) / T_PS;
  endfunction

  // Model of the sampling unit plus per-pass checking.
  initial begin
    forever begin
      logic [CNT_W-1:0] nn;
      int old_tap, want;
      real p, x_over_n, delta;
      @(sample);
      @(posedge clk); #1;
      nn = n;
      check(nn == ((pass_no == 0) ? n_coarse : n_fine),
            $sformatf("pass %0d uses n=%0d", pass_no, nn));
      old_tap = int'(tap);
      repeat (3) @(posedge clk);
      sample_ready = 0;
      repeat (20 + $urandom_range(20, 0)) @(posedge clk);
      p = share_a(d0 + old_tap * TAP_PS);
      count_x = CNT_W'(int'($floor(p * nn + 0.5)));
      x_over_n = real'(count_x) / real'(nn);
      sample_ready = 1;
      delta = (real'(target_phase) / 65536.0 - x_over_n) * (real'(cycle_taps) / 256.0);
      want = old_tap + ((delta < 0) ? -int'($floor(-delta + 0.5)) : int'($floor(delta + 0.5)));
      if (want < 0) want = 0;
      if (want > 63) want = 63;
      wait (dut.state == dut.S_START || dut.state == dut.S_DONE);
      #1;
      check(int'(tap) == want, $sformatf("pass %0d: tap %0d expected %0d (X=%0d)", pass_no, tap, want, count_x));
      pass_no++;
    end
  end

  // One calibration; returns the number of passes run.
  task automatic calibrate(input real lag0, input int exp_tap, input int exp_passes);
    d0 = lag0;
    pass_no = 0;
    @(negedge clk) align = 1;
    @(posedge clk); #1;
    check(!done, "done cleared when align rises");
    wait (done);
    repeat (3) @(posedge clk); #1;
    check(int'(tap) == exp_tap, $sformatf("lag0=%0.0f: final tap %0d expected %0d", lag0, tap, exp_tap));
    check(pass_no == exp_passes && int'(passes) == exp_passes,
          $sformatf("lag0=%0.0f: %0d passes, expected %0d", lag0, pass_no, exp_passes));
    @(negedge clk) align = 0;
    repeat (10) @(posedge clk); #1;
    check(int'(tap) == exp_tap && done, "tap and done hold after align falls");
  endtask

  initial begin
    #12000 rst_n = 1;
    repeat (3) @(posedge clk);
    check(tap == 0 && !done, "reset state");
    // Lag 100 ps at tap 0; 400 ps more is wanted: tap 12 (396 ps).
    calibrate(100.0, 12, 2);
    // Line got shorter: lag now 200 ps more; wanted back off to tap 6.
    calibrate(300.0, 6, 2);
    // Lag already 800 ps with no delay: needs -300 ps, clamps at tap 0,
    // every pass still asks for a correction, so all four passes run.
    calibrate(800.0, 0, 4);
    // A different target: 60 deg (0x2AAB), lag 0 -> 333 ps, tap 10.
    target_phase = 16'h2AAB;
    calibrate(0.0, 10, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
