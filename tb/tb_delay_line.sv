// tb_delay_line: sends edges through the programmable delay line for many
// tap settings and checks that each output edge follows its input edge
// by tap * 33 ps, and that pulses shorter than the delay still pass.
`timescale 1ps/1ps
module tb_delay_line;
  logic din = 0, dout;
  logic [5:0] tap = '0;
  int checks = 0, failures = 0;

  delay_line dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    #1000;
    for (int i = 0; i < 64; i++) begin
      tap = 6'(i);
      #3000;
      din = ~din; t0 = $realtime;
      if (i > 0) begin
        #1;
        checks++;
        if (dout === din) begin failures++; $display("tap %0d: too early", i); end
        @(dout);
      end else #1;
      checks++;
      if (int'($realtime - t0) != (i == 0 ? 1 : i * 33) || dout !== din) begin
        failures++; $display("tap %0d: delay %0t", i, $realtime - t0);
      end
    end
    // Short pulse through a long delay.
    tap = 6'd40; #3000;
    din = 1; #100; din = 0;
    #(40 * 33 - 100 + 50);
    checks++;
    if (dout !== 1'b1) begin failures++; $display("pulse lost"); end
    #200;
    checks++;
    if (dout !== 1'b0) begin failures++; $display("pulse end lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
