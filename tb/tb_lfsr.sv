// tb_lfsr: checks the LFSR against a reference next-state function
// written from the polynomial x^16 + x^14 + x^13 + x^11 + 1, checks that
// the reset value is the seed, and that the sequence has the maximal
// period 2^16 - 1 (no state repeats earlier and all-zero never appears).
`timescale 1ps/1ps
module tb_lfsr;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] q;
  int checks = 0, failures = 0;
  bit seen [logic [W-1:0]];
  logic [W-1:0] expect_q;

  lfsr dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] next(input logic [W-1:0] s);
    // x^16 + x^14 + x^13 + x^11 + 1: new bit = s[15]^s[13]^s[12]^s[10]
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  initial begin
    #12000;
    checks++;
    if (q !== 16'hACE1) begin failures++; $display("reset value %h", q); end
    expect_q = q;
    seen[q] = 1;
    rst_n = 1;
    for (int i = 1; i < (1 << W) - 1; i++) begin
      @(posedge clk); #1;
      expect_q = next(expect_q);
      checks++;
      if (q !== expect_q || q == '0 || seen.exists(q)) begin
        failures++;
        if (failures < 5) $display("step %0d: q=%h expected %h", i, q, expect_q);
      end
      seen[q] = 1;
    end
    @(posedge clk); #1;
    checks++;
    if (q !== 16'hACE1 || seen.num() != (1 << W) - 1) begin
      failures++; $display("period not maximal");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
