// Unsigned sequential restoring divider: quotient = dividend / divisor.
//
// One quotient bit per clock cycle, most significant first, so a division
// takes NW cycles after start; done pulses for one cycle when quotient is
// valid. A start while busy is ignored. A zero divisor yields all ones.
module seq_divider #(
  parameter int NW = 50,   // dividend and quotient width
  parameter int DW = 32    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic [NW-1:0] quotient,
  output logic          busy,
  output logic          done
);

  localparam int CW = $clog2(NW + 1);

  logic [NW-1:0] num;      // dividend bits still to shift in
  logic [DW:0]   rem;      // partial remainder
  logic [DW-1:0] den;
  logic [CW-1:0] count;

  logic [DW:0] rem_shift;
  logic [DW:0] rem_diff;

  always_comb begin
    rem_shift = {rem[DW-1:0], num[NW-1]};
    rem_diff  = rem_shift - {1'b0, den};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num      <= '0;
      rem      <= '0;
      den      <= '0;
      count    <= '0;
      quotient <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          num      <= dividend;
          den      <= divisor;
          rem      <= '0;
          quotient <= '0;
          count    <= CW'(NW);
          busy     <= 1'b1;
        end
      end else begin
        num <= {num[NW-2:0], 1'b0};
        if (!rem_diff[DW]) begin
          rem      <= rem_diff;
          quotient <= {quotient[NW-2:0], 1'b1};
        end else begin
          rem      <= rem_shift;
          quotient <= {quotient[NW-2:0], 1'b0};
        end
        count <= count - 1'b1;
        if (count == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
