// Two-sample quadrature signal generator.
//
// From the smoothed samples s_k, s_{k-1}, s_{k-2} it forms the in-quadrature
// (90 degree lagging) signal
//     beta'_k = (s_{k-2} - s_k) / sin(4*pi/N_k) + s_k * tan(2*pi/N_k),
// with the two coefficients supplied by qsg_coeff for the present PLL
// frequency. Only s_k and s_{k-2} enter; s_{k-1} is just passed on.
//
// The first delay (s_{k-1}) is the smoother's state, so this block holds only
// the second delay. On en it registers beta'_k and shifts s_{k-1} into the
// s_{k-2} register; beta_p is valid from the next cycle.
module qsg_2s
  import pll_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  q_t   s_k,
  input  q_t   s_km1,
  input  q_t   c_isin,   // 1 / sin(4*pi/N_k)
  input  q_t   c_tan,    // tan(2*pi/N_k)
  output q_t   beta_p    // beta'_k
);

  q_t s_km2;
  q_t beta_next;

  always_comb beta_next = qadd(qmul(qsub(s_km2, s_k), c_isin), qmul(s_k, c_tan));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_km2  <= '0;
      beta_p <= '0;
    end else if (en) begin
      s_km2  <= s_km1;
      beta_p <= beta_next;
    end
  end

endmodule
