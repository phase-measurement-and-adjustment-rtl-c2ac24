// tb_rsu_event_counter: checks Counter 2 of the random sampling unit
// against a reference count: increments only with enable, synchronous
// clear with priority, and wrap-around at the counter width.
`timescale 1ps/1ps
module tb_rsu_event_counter;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [W-1:0] q;
  int checks = 0, failures = 0;
  int unsigned ref_q;

  rsu_event_counter #(.W(W)) dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic c, input logic e);
    @(negedge clk);
    clear = c; en = e;
    @(posedge clk); #1;
    if (c) ref_q = 0;
    else if (e) ref_q = (ref_q + 1) % (1 << W);
    checks++;
    if (q !== W'(ref_q)) begin
      failures++;
      $display("mismatch: q=%0d expected %0d", q, ref_q);
    end
  endtask

  initial begin
    ref_q = 0;
    #12000 rst_n = 1;
    checks++;
    if (q !== '0) failures++;
    repeat (2000) step(($urandom_range(99, 0) < 2), $urandom_range(1, 0));
    step(1, 1);                          // clear wins over enable
    repeat ((1 << W) + 3) step(0, 1);     // wrap-around
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
