// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// A pulse on start latches dividend and divisor; DW clock cycles later
// done pulses for one cycle with quotient = dividend / divisor (remainder
// dropped). busy is high in between. A zero divisor gives an all-ones
// quotient. Used by the control unit to turn a count ratio into taps; the
// divider, and doing the division sequentially, are this design's choice.
`timescale 1ps/1ps
module seq_divider #(
  parameter int unsigned DW = 48,
  parameter int unsigned VW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quotient
);
  logic [DW-1:0]          shreg;     // dividend bits not yet used
  logic [VW-1:0]          rem;
  logic [VW-1:0]          dvs;
  logic [$clog2(DW+1)-1:0] left;
  logic [VW:0]            trial;

  always_comb trial = {rem, shreg[DW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; left <= '0;
      shreg <= '0; rem <= '0; dvs <= '0; quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; shreg <= dividend; dvs <= divisor;
        rem <= '0; quotient <= '0; left <= DW[$clog2(DW+1)-1:0];
      end else if (busy) begin
        shreg <= shreg << 1;
        if (trial >= {1'b0, dvs}) begin
          rem      <= VW'(trial - {1'b0, dvs});
          quotient <= {quotient[DW-2:0], 1'b1};
        end else begin
          rem      <= VW'(trial);
          quotient <= {quotient[DW-2:0], 1'b0};
        end
        left <= left - 1'b1;
        if (left == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
