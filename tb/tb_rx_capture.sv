// tb_rx_capture: checks the receiver flip-flop: Data Out takes the value of
// the line at each rising clock edge and holds it in between, ignoring
// changes of the line while the clock is high or low.
`timescale 1ps/1ps
module tb_rx_capture;
  logic clk = 0, d = 0, q;
  int checks = 0, failures = 0;

  rx_capture dut (.*);

  always #1000 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    @(posedge clk); #1 prev = q;
    repeat (500) begin
      logic v;
      @(negedge clk);
      #100;
      v = 1'($urandom_range(1, 0));
      d = v;
      #899;
      checks++;                           // nothing taken before the edge
      if (q !== prev) begin failures++; $display("q changed before the clock edge"); end
      @(posedge clk); #300;
      d = ~v;
      #100;
      checks++;
      if (q !== v) begin failures++; $display("q=%0b expected %0b", q, v); end
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
