// tb_rsu_down_counter: checks Counter 1 of the random sampling unit
// against a reference count kept in the testbench: load of random values,
// decrement only with enable, hold at zero, load winning over enable, and
// the active-low zero flag.
`timescale 1ps/1ps
module tb_rsu_down_counter;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, load = 0, en = 0, zero_n;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0;
  int unsigned ref_q;

  rsu_down_counter #(.W(W)) dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic l, input logic e, input logic [W-1:0] v);
    @(negedge clk);
    load = l; en = e; d = v;
    @(posedge clk); #1;
    if (l) ref_q = v;
    else if (e && ref_q != 0) ref_q = ref_q - 1;
    checks++;
    if (q !== W'(ref_q) || zero_n !== (ref_q != 0)) begin
      failures++;
      $display("mismatch: q=%0d zero_n=%0b expected %0d", q, zero_n, ref_q);
    end
  endtask

  initial begin
    ref_q = 0;
    #12000 rst_n = 1;
    // Count a short load all the way down and past zero.
    step(1, 0, 5);
    repeat (8) step(0, 1, 0);
    // Load wins over enable.
    step(1, 1, 16'hFFFF);
    repeat (20) step(0, 1, 0);
    // Random traffic.
    repeat (3000) step(($urandom_range(99, 0) < 3), $urandom_range(1, 0), 16'($urandom_range(40, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
