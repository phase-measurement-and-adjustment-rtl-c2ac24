// tb_rsu_accuracy: repeats the accuracy experiment on the random sampling
// unit fed by the on-chip random clock oscillator: two 100 MHz signals 90
// degrees apart (true region-A share 0.25), measured with the sample size
// that the sample-size formula n = (z/alpha)^2 * P(1-P), taken at its
// worst case P = 0.5, gives for each accuracy 1 - alpha and confidence
// level.
//
//  * alpha = 0.1 and 0.01 with confidence 90 % .. 99.9999 % fit the 16-bit
//    counters (largest n = 59 820); 100 experiments each on a 16-bit unit.
//  * alpha = 0.001 needs n of 2^19.4 to 2^22.4, beyond 16 bits; two
//    experiments per confidence level run on a 24-bit copy.
//
// For each setting the testbench prints the largest error seen, divided by
// alpha, and checks that the share of experiments within alpha is at least
// the confidence level less three binomial standard deviations (and one
// experiment), that no error exceeds alpha at confidence 99.99 % and
// above, that the mean over all experiments at alpha = 0.01 is
// within four standard errors of 0.25, and that each measurement takes
// exactly n random clock edges after it starts.
`timescale 1ps/1ps
module tb_rsu_accuracy;
  import rsu_pkg::*;
  localparam int K16 = 100, K24 = 2;
  localparam real Z [6] = '{1.6449, 2.5758, 3.2905, 3.8906, 4.4172, 4.8916};
  localparam string CL_NAME [6] = '{"90%", "99%", "99.9%", "99.99%", "99.999%", "99.9999%"};
  localparam real CL [6] = '{0.9, 0.99, 0.999, 0.9999, 0.99999, 0.999999};

  logic sys_clk = 0, rst_n = 1, rand_clk;
  logic s1 = 0, s2 = 0;
  logic smp16 = 0, smp24 = 0, rdy16, rdy24;
  logic [15:0] n16 = 16'd1, x16;
  logic [23:0] n24 = 24'd1, x24;
  int checks = 0, failures = 0;
  longint edges = 0;

  random_clock_gen u_rclk (.sys_clk, .rst_n, .rand_clk);
  rsu #(.CNT_W(16)) u_rsu16 (.rand_clk, .rst_n, .sample(smp16), .signal1(s1), .signal2(s2),
                             .region_code(REGION_A), .n(n16), .sample_ready(rdy16), .count_x(x16));
  rsu #(.CNT_W(24)) u_rsu24 (.rand_clk, .rst_n, .sample(smp24), .signal1(s1), .signal2(s2),
                             .region_code(REGION_A), .n(n24), .sample_ready(rdy24), .count_x(x24));

  always #3500 sys_clk = ~sys_clk;
  always #5000 s1 = ~s1;
  initial begin
    #2500;
    forever #5000 s2 = ~s2;
  end
  always @(posedge rand_clk) edges++;

  initial begin
    #200_000_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int sample_size(input real z, input real alpha);
    return int'($ceil((z / alpha) * (z / alpha) * 0.25));
  endfunction

  // One measurement on the unit of the given width; returns X/n.
  task automatic measure(input bit wide, input int nn, output real p);
    longint e0, e1;
    @(negedge rand_clk);
    if (wide) begin n24 = 24'(nn); smp24 = ~smp24; end
    else      begin n16 = 16'(nn); smp16 = ~smp16; end
    e0 = edges;
    if (wide) begin wait (!rdy24); wait (rdy24); end
    else      begin wait (!rdy16); wait (rdy16); end
    e1 = edges;
    check(e1 - e0 == longint'(nn) + 3, $sformatf("measurement took %0d edges for n=%0d", e1 - e0, nn));
    p = wide ? real'(x24) / nn : real'(x16) / nn;
  endtask

  task automatic setting(input bit wide, input int k, input real alpha, input int ci,
                         inout real sum_p, inout int cnt_p);
    int nn, n_in;
    real p, maxe, need;
    nn = sample_size(Z[ci], alpha);
    n_in = 0; maxe = 0.0;
    for (int i = 0; i < k; i++) begin
      real e;
      measure(wide, nn, p);
      e = (p > 0.25) ? p - 0.25 : 0.25 - p;
      if (e <= alpha) n_in++;
      if (e / alpha > maxe) maxe = e / alpha;
      sum_p += p; cnt_p++;
    end
    need = k * CL[ci] - 3.0 * $sqrt(k * CL[ci] * (1.0 - CL[ci])) - 1.0;
    $display("accuracy %0.1f%% confidence %-9s n=%0d (log2 %0.1f): max error / alpha = %0.3f, %0d of %0d within",
             100.0 * (1.0 - alpha), CL_NAME[ci], nn, $ln(nn) / $ln(2.0), maxe, n_in, k);
    check(real'(n_in) >= need, "share of experiments within alpha");
    if (CL[ci] >= 0.9999) check(maxe <= 1.0, "largest error within alpha");
  endtask

  initial begin
    real sum1, sum2;
    int cnt1, cnt2;
    real mean, se;
    #1 rst_n = 0;
    #50000 rst_n = 1;
    repeat (20) @(posedge rand_clk);
    sum1 = 0; cnt1 = 0; sum2 = 0; cnt2 = 0;
    for (int ci = 0; ci < 6; ci++) setting(0, K16, 0.1, ci, sum1, cnt1);
    for (int ci = 0; ci < 6; ci++) setting(0, K16, 0.01, ci, sum2, cnt2);
    mean = sum2 / cnt2;
    se = $sqrt(0.1875 / (cnt2 * sample_size(Z[0], 0.01)));
    $display("mean X/n at alpha=0.01 over %0d experiments: %f", cnt2, mean);
    check(mean > 0.25 - 4.0 * se && mean < 0.25 + 4.0 * se, "mean estimate unbiased");
    for (int ci = 0; ci < 6; ci++) setting(1, K24, 0.001, ci, sum1, cnt1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
