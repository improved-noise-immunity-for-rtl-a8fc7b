// Grid-voltage reconstruction for the PLL input.
//
// The grid voltage is rectified before it is sensed, so the ADC delivers
// |v_g| and a separate digital polarity signal tells the half cycle. This
// block rebuilds the signed per-unit sample alpha_k = +/- |v_g| / V_peak:
// the unsigned ADC code is multiplied by 1/PEAK_CODE (a constant with 40
// fractional bits)
// and negated when polarity is low.
//
// Interface: adc_code and polarity are sampled on en (one clk-cycle strobe
// per sampling period); alpha is registered and valid from the cycle after.
// The rectified sensing and the digital polarity follow the document; the
// ADC width, the code that stands for the nominal peak (PEAK_CODE) and
// "polarity = 1 means the positive half cycle" are this design's choices.
module polarity_reconstruct
  import pll_pkg::*;
#(
  parameter int ADC_BITS  = 12,
  parameter int PEAK_CODE = 3500   // ADC code of the nominal grid peak (1.0 pu)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [ADC_BITS-1:0] adc_code,
  input  logic                polarity,
  output q_t                  alpha
);

  // 1/PEAK_CODE with 16 guard bits beyond Q8.24.
  localparam int          GB    = 16;
  localparam logic [63:0] SCALE = 64'(longint'(2.0**(QF + GB) / real'(PEAK_CODE)));

  q_t magnitude;

  always_comb begin
    logic [63:0] p;
    p = 64'(adc_code) * SCALE;
    magnitude = q_t'(p >> GB);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  alpha <= '0;
    else if (en) alpha <= polarity ? magnitude : -magnitude;
  end

endmodule
