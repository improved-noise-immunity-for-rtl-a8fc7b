// Park-transform phase detector of the PLL.
//
// With the grid written as alpha = V sin(theta_g) and the QSG output as the
// 90-degree-lagging beta = -V cos(theta_g), rotating (alpha, beta) by the
// PLL phase theta gives
//     vq = alpha*cos(theta) + beta*sin(theta) = V sin(theta_g - theta)
//     vd = alpha*sin(theta) - beta*cos(theta) = V cos(theta_g - theta)
// so vq is the phase error (per unit, for small errors) and vd the amplitude.
// The document specifies a Park-based detector; the sine-referenced sign
// convention, chosen so that the PLL's sin(theta) is in phase with the grid,
// is this design's.
//
// Interface: inputs are read on en; vd and vq are registered.
module park_pd
  import pll_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  q_t   alpha,
  input  q_t   beta,
  input  q_t   sin_t,
  input  q_t   cos_t,
  output q_t   vd,
  output q_t   vq
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vd <= '0;
      vq <= '0;
    end else if (en) begin
      vq <= qadd(qmul(alpha, cos_t), qmul(beta, sin_t));
      vd <= qsub(qmul(alpha, sin_t), qmul(beta, cos_t));
    end
  end

endmodule
