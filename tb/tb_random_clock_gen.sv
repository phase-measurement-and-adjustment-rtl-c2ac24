// tb_random_clock_gen: checks the random clock oscillator end to end.
// After reset is released the output toggles; every half period lies in
// the range of the shortest to the longest ring plus jitter; and, because
// the LFSR keeps changing the ring length, the half periods fall into at
// least six of the eight length classes and are spread rather than
// periodic. Before reset is released the output rests low.
`timescale 1ps/1ps
module tb_random_clock_gen;
  logic sys_clk = 0, rst_n = 0, rand_clk;
  int checks = 0, failures = 0;
  int cls_hits [8];

  random_clock_gen dut (.*);

  always #1500 sys_clk = ~sys_clk;

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    int classes;
    #20000;
    checks++;
    if (rand_clk !== 1'b0) begin failures++; $display("toggles in reset"); end
    rst_n = 1;
    @(rand_clk); t0 = $realtime;
    repeat (4000) begin
      int unsigned d;
      @(rand_clk); t1 = $realtime;
      d = int'(t1 - t0); t0 = t1;
      checks++;
      if (d < 13 * 40 || d > 27 * 40 + 160) begin
        failures++; $display("half period %0d out of range", d);
      end else begin
        // class = ring length step, ignoring the jitter part
        cls_hits[(d - 13 * 40) / 80 > 7 ? 7 : (d - 13 * 40) / 80]++;
      end
    end
    classes = 0;
    foreach (cls_hits[i]) if (cls_hits[i] > 0) classes++;
    checks++;
    if (classes < 6) begin failures++; $display("only %0d ring lengths used", classes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
