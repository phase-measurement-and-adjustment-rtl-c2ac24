// tb_rsu: checks the random sampling unit cycle by cycle.
//
// rand_clk is a plain clock here, and Signal 1 / Signal 2 are random bits
// changed between edges, so the expected count can be worked out exactly:
// the testbench keeps the history of applied values and, for every trial
// edge, tests the pair applied two edges before it (the depth of the
// synchroniser) against the region code. Also checked: Sample Ready falls
// SYNC_STAGES+1 edges after a Sample toggle and rises after exactly n
// trials, both toggle directions start a measurement, a fully matching
// input gives X = n and a never-matching one X = 0, and a measurement
// restarted before it finishes begins afresh.
`timescale 1ps/1ps
module tb_rsu;
  import rsu_pkg::*;
  localparam int CNT_W = 16;
  localparam int SYNC  = 2;

  logic rand_clk = 0, rst_n = 0, sample = 0, signal1 = 0, signal2 = 0;
  region_e region_code = REGION_A;
  logic [CNT_W-1:0] n = 1, count_x;
  logic sample_ready;
  int checks = 0, failures = 0;
  int edge_no = 0;
  logic [1:0] hist [int];                    // pair applied before edge k

  rsu #(.CNT_W(CNT_W), .SYNC_STAGES(SYNC)) dut (.*);

  always #5000 rand_clk = ~rand_clk;
  always @(posedge rand_clk) edge_no++;

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One measurement. mode 0: random pairs, 1: always the region code,
  // 2: never the region code.
  task automatic measure(input int unsigned nn, input region_e rc, input int mode,
                         input bit running = 0);
    int start, fall_edge, rise_edge, expect_x;
    bit seen_fall;
    @(negedge rand_clk);
    n = CNT_W'(nn); region_code = rc;
    sample = ~sample;
    start = edge_no;                          // next edge is number start+1
    seen_fall = 0;
    fall_edge = -1; rise_edge = -1;
    while (rise_edge < 0) begin
      logic [1:0] pr;
      case (mode)
        0: pr = 2'($urandom_range(3, 0));
        1: pr = rc;
        default: pr = ~rc;
      endcase
      {signal1, signal2} = pr;
      hist[edge_no + 1] = pr;
      @(posedge rand_clk); #1;
      if (!seen_fall && !sample_ready) begin seen_fall = 1; fall_edge = edge_no - start; end
      else if (seen_fall && sample_ready) rise_edge = edge_no - start;
      @(negedge rand_clk);
      if (edge_no - start > int'(nn) + 20) break;
    end
    check(fall_edge == (running ? 1 : SYNC + 1), $sformatf("ready fell at edge %0d", fall_edge));
    check(rise_edge == SYNC + 1 + int'(nn), $sformatf("ready rose at edge %0d, n=%0d", rise_edge, nn));
    expect_x = 0;
    for (int e = start + SYNC + 2; e <= start + SYNC + 1 + int'(nn); e++)
      if (hist[e - SYNC] == rc) expect_x++;
    check(count_x == CNT_W'(expect_x), $sformatf("X=%0d expected %0d (mode %0d)", count_x, expect_x, mode));
    // X stays put after the measurement.
    repeat (5) @(posedge rand_clk);
    #1 check(count_x == CNT_W'(expect_x) && sample_ready, "X held after end");
  endtask

  initial begin
    #12000 rst_n = 1;
    check(sample_ready == 1'b1, "ready after reset");
    measure(10, REGION_A, 1);
    measure(10, REGION_A, 2);
    measure(1, REGION_B, 1);
    for (int i = 0; i < 40; i++) begin
      region_e rc;
      rc = region_e'($urandom_range(3, 0));
      measure($urandom_range(300, 2), rc, 0);
    end
    // Restart in the middle: toggle again before the end.
    @(negedge rand_clk); n = 50; region_code = REGION_A; {signal1, signal2} = 2'b10;
    sample = ~sample;
    repeat (20) @(negedge rand_clk);
    measure(30, REGION_A, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
