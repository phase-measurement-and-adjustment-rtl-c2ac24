// tb_tx_launch: checks the transmitter: with align low the line carries
// Data In registered on the transmit clock (one cycle later, and only
// changing at clock edges); with align high it carries the clock pattern.
`timescale 1ps/1ps
module tb_tx_launch;
  logic clk = 0, clk_pat, align = 0, data_in = 0, line_out;
  int checks = 0, failures = 0;
  logic expect_q;

  tx_launch dut (.*);

  always #1000 clk = ~clk;
  assign #100 clk_pat = clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    repeat (300) begin
      logic v;
      @(negedge clk);
      if ($urandom_range(9, 0) == 0) align = ~align;
      v = 1'($urandom_range(1, 0));
      data_in = v;
      @(posedge clk); expect_q = v;
      #500;
      data_in = ~v;                       // must not leak through
      #10;
      checks++;
      if (align ? (line_out !== clk_pat) : (line_out !== expect_q)) begin
        failures++; $display("align=%0b line=%0b", align, line_out);
      end
      #600;                               // clock low half
      checks++;
      if (align ? (line_out !== clk_pat) : (line_out !== expect_q)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
