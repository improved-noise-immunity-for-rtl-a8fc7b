// Sine and cosine of a phase by iterative CORDIC rotation.
//
// The phase (2^32 = one turn) is first folded into [-1/4, +1/4] turn by
// subtracting half a turn where needed (the results are then negated), then
// ITER micro-rotations by +/- atan(2^-i) drive the residual angle to zero,
// starting from (K, 0) with K = prod 1/sqrt(1 + 2^-2i) so that the rotated
// vector ends at (cos, sin) in Q8.24. The arctangent table and K are
// computed at elaboration from those formulas.
//
// Interface: start (one cycle, ignored while busy) latches phase; ITER+1
// cycles later sin_o/cos_o are updated and done pulses. After reset the
// outputs hold sin(0) = 0 and cos(0) = 1.
module cordic_sincos
  import pll_pkg::*;
#(
  parameter int ITER = 24
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  phase_t phase,
  output q_t     sin_o,
  output q_t     cos_o,
  output logic   busy,
  output logic   done
);

  typedef logic signed [31:0] tab_t [ITER];

  function automatic tab_t atan_table();
    tab_t t;
    for (int i = 0; i < ITER; i++)
      t[i] = 32'(longint'($atan(2.0 ** (-i)) / (2.0 * PI_R) * 2.0**32));
    return t;
  endfunction

  function automatic real cordic_gain();
    real k;
    k = 1.0;
    for (int i = 0; i < ITER; i++) k = k / $sqrt(1.0 + 2.0 ** (-2 * i));
    return k;
  endfunction

  localparam tab_t ATAN = atan_table();
  localparam q_t   K0   = to_q(cordic_gain());
  localparam int   CW   = $clog2(ITER + 1);

  q_t                 x, y;
  logic signed [31:0] z;
  logic               neg;
  logic [CW-1:0]      i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x     <= '0;
      y     <= '0;
      z     <= '0;
      neg   <= 1'b0;
      i     <= '0;
      sin_o <= '0;
      cos_o <= Q_ONE;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          logic signed [31:0] a;
          a = signed'(phase);
          // Outside +/- 1/4 turn: rotate by half a turn (flip the MSB) and
          // negate the results.
          if (a > 32'sh4000_0000 || a < -32'sh4000_0000) begin
            z   <= {~a[31], a[30:0]};
            neg <= 1'b1;
          end else begin
            z   <= a;
            neg <= 1'b0;
          end
          x    <= K0;
          y    <= '0;
          i    <= '0;
          busy <= 1'b1;
        end
      end else if (i == CW'(ITER)) begin
        sin_o <= neg ? -y : y;
        cos_o <= neg ? -x : x;
        busy  <= 1'b0;
        done  <= 1'b1;
      end else begin
        if (!z[31]) begin
          x <= x - (y >>> i);
          y <= y + (x >>> i);
          z <= z - ATAN[i];
        end else begin
          x <= x + (y >>> i);
          y <= y - (x >>> i);
          z <= z + ATAN[i];
        end
        i <= i + 1'b1;
      end
    end
  end

endmodule
