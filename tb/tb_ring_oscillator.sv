// tb_ring_oscillator: checks the behavioural ring oscillator: with enable
// low the output rests low; for every ring length select the time between
// output edges lies in [(13 + 2*sel)*40, (13 + 2*sel)*40 + 160] ps; the
// half periods of one setting are not all equal (the jitter term is there).
`timescale 1ps/1ps
module tb_ring_oscillator;
  logic enable = 0;
  logic [2:0] len_sel = '0;
  logic rand_clk;
  int checks = 0, failures = 0;

  ring_oscillator dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned lo, hi, minv, maxv;
    realtime t0, t1;
    #5000;
    checks++;
    if (rand_clk !== 1'b0) failures++;
    for (int s = 0; s < 8; s++) begin
      len_sel = 3'(s);
      enable = 1;
      @(rand_clk); t0 = $realtime;
      lo = (13 + 2 * s) * 40; hi = lo + 160;
      minv = '1; maxv = 0;
      repeat (200) begin
        int unsigned d;
        @(rand_clk); t1 = $realtime;
        d = int'(t1 - t0); t0 = t1;
        if (d < minv) minv = d;
        if (d > maxv) maxv = d;
        checks++;
        if (d < lo || d > hi) begin
          failures++; $display("sel %0d: half period %0d outside %0d..%0d", s, d, lo, hi);
        end
      end
      checks++;
      if (maxv == minv) begin failures++; $display("sel %0d: no jitter", s); end
      enable = 0;
      #3000;
      checks++;
      if (rand_clk !== 1'b0) begin failures++; $display("output not low when disabled"); end
      repeat (3) begin
        #700; checks++;
        if (rand_clk !== 1'b0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
