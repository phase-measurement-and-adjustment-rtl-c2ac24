// tb_clkq_delay: checks that a clock passes the fixed clock-to-Q matching
// delay shifted by exactly 100 ps, rising and falling edges alike.
`timescale 1ps/1ps
module tb_clkq_delay;
  logic din = 0, dout;
  int checks = 0, failures = 0;

  clkq_delay dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    #1000;
    for (int i = 0; i < 50; i++) begin
      din = ~din; t0 = $realtime;
      #99;
      checks++;
      if (dout === din) begin failures++; $display("edge %0d early", i); end
      #1;
      checks++;
      if (dout !== din) begin failures++; $display("edge %0d late", i); end
      #(300 + 10 * i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
