// Digital controller of a single-phase totem-pole PFC with a 2SS-PLL.
//
// Two cascaded loops shape the line current. The slow outer loop compares
// the DC output voltage with its reference and, through a PI controller,
// sets the amplitude of the current reference. The PLL (pll_2ss) supplies
// sin(theta) in phase with the grid, so the reference i_ref = A*sin(theta) is
// a sinusoid synchronous with the grid voltage. The fast inner loop compares
// i_ref with the measured line current and, through a second PI controller,
// sets the duty cycle of the PWM.
//
// Sampling: the PWM carrier defines the sampling period. In the first cycle
// of each period (adc_trigger) the three ADC codes are taken as valid; the
// voltage and current controllers update in that cycle and the PLL starts on
// the same sample. When the PLL is done it has sin(theta) of the next
// sampling instant, and the reference for that instant is formed then. The
// new duty cycle takes effect at the next period start.
//
// Scaling: all controller quantities are per unit in Q8.24. The grid voltage
// code is rectified (a polarity bit gives its sign); the current code is
// offset binary around IL_ZERO_CODE; codes per unit are parameters.
//
// From the document: the loop structure of its controller figure, the 2SS
// PLL and its parameters, rectified grid-voltage sensing with a digital
// polarity signal. Own choices: the ADC scaling, the controller gains and
// limits of the two PFC loops (the document gives none), the clock of
// 100 MHz implied by PWM_PERIOD = 15625, the duty range [0, 1], and the
// half-cycle rectification of the current error. The gate driver, outside
// this block, applies pwm_out to S2 when half_cycle is 1 and to S1 when it
// is 0 (the switch that boosts in that half cycle); the per-unit base of the
// gains is the grid peak voltage and 1 pu of current (IL_PU_CODE).
module pfc_controller
  import pll_pkg::*;
#(
  parameter int  ADC_BITS     = 12,
  parameter int  PWM_PERIOD   = 15625,      // clock cycles per Ts
  parameter real TS           = 156.25e-6,
  parameter int  VG_PEAK_CODE = 3500,       // grid-voltage code of 1 pu
  parameter int  IL_ZERO_CODE = 2048,       // current code of 0 A
  parameter int  IL_PU_CODE   = 1000,       // current code span of 1 pu
  parameter int  VO_PU_CODE   = 2500,       // output-voltage code of 1 pu
  parameter real KP_V         = 2.0,        // DC-voltage controller
  parameter real KI_V         = 20.0,
  parameter real I_MAX        = 1.2,        // limit of the current amplitude
  parameter real KP_I         = 0.4,        // current controller
  parameter real KI_I         = 200.0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ADC_BITS-1:0] adc_vg,       // |v_g|
  input  logic                polarity,     // 1: positive half cycle
  input  logic [ADC_BITS-1:0] adc_il,       // line current
  input  logic [ADC_BITS-1:0] adc_vo,       // DC output voltage
  input  q_t                  vdc_ref,      // V*_DC, pu
  output logic                adc_trigger,  // sampling instant
  output logic                pwm_out,      // to the gate driver
  output q_t                  sin_theta,    // PLL output
  output q_t                  pll_delta,    // PLL frequency as omega*Ts
  output phase_t              pll_theta,
  output q_t                  i_amp,        // current-reference amplitude
  output q_t                  i_ref,        // current reference of the sample
  output q_t                  duty,         // duty command of the boost switch
  output logic                half_cycle,   // sign of i_ref: 1 positive (S2 boosts)
  output logic                pll_freq_limited,
  output logic                v_loop_sat,
  output logic                i_loop_sat
);

  // Code-to-per-unit scales with 16 guard bits beyond Q8.24.
  localparam int GB = 16;
  localparam logic signed [63:0] IL_SCALE = 64'(longint'(2.0**(QF + GB) / real'(IL_PU_CODE)));
  localparam logic signed [63:0] VO_SCALE = 64'(longint'(2.0**(QF + GB) / real'(VO_PU_CODE)));

  logic sample_en;
  assign adc_trigger = sample_en;

  // Per-unit measurements.
  q_t il_pu, vo_pu;
  always_comb begin
    logic signed [ADC_BITS:0] il_c;
    logic signed [63:0]       il_p, vo_p;
    il_c  = $signed({1'b0, adc_il}) - (ADC_BITS+1)'(IL_ZERO_CODE);
    il_p  = 64'(il_c) * IL_SCALE;
    vo_p  = 64'($signed({1'b0, adc_vo})) * VO_SCALE;
    il_pu = q_t'(il_p >>> GB);
    vo_pu = q_t'(vo_p >>> GB);
  end

  // PLL.
  q_t     alpha, beta, vd, vq, cos_t;
  logic   pll_busy, pll_done;

  pll_2ss #(.TS(TS), .ADC_BITS(ADC_BITS), .PEAK_CODE(VG_PEAK_CODE)) u_pll (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en),
    .adc_vg(adc_vg), .polarity(polarity),
    .alpha(alpha), .beta(beta), .vd(vd), .vq(vq),
    .delta(pll_delta), .theta(pll_theta), .sin_t(sin_theta), .cos_t(cos_t),
    .freq_limited(pll_freq_limited), .busy(pll_busy), .done(pll_done)
  );

  // DC-voltage controller: amplitude of the current reference.
  pi_controller #(
    .KP(KP_V), .KI(KI_V), .TS(TS), .OUT_SCALE(1.0), .OUT_MIN(0.0), .OUT_MAX(I_MAX)
  ) u_vctrl (
    .clk(clk), .rst_n(rst_n), .en(sample_en),
    .err(qsub(vdc_ref, vo_pu)), .y(i_amp), .sat(v_loop_sat)
  );

  // Reference multiplier: the reference of the next sampling instant, and
  // the half cycle it belongs to.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_ref      <= '0;
      half_cycle <= 1'b1;
    end else if (pll_done) begin
      i_ref      <= qmul(i_amp, sin_theta);
      half_cycle <= !sin_theta[QW-1];
    end
  end

  // Current controller. In either half cycle the PWM drives the switch that
  // works as the boost switch, so the error is taken with the sign of the
  // half cycle: the controller sees |i_ref| - |i_L| in both.
  q_t i_err;
  always_comb i_err = half_cycle ? qsub(i_ref, il_pu) : qsub(il_pu, i_ref);

  pi_controller #(
    .KP(KP_I), .KI(KI_I), .TS(TS), .OUT_SCALE(1.0), .OUT_MIN(0.0), .OUT_MAX(1.0)
  ) u_ictrl (
    .clk(clk), .rst_n(rst_n), .en(sample_en),
    .err(i_err), .y(duty), .sat(i_loop_sat)
  );

  pwm #(.PERIOD(PWM_PERIOD)) u_pwm (
    .clk(clk), .rst_n(rst_n), .duty(duty),
    .pwm_out(pwm_out), .period_start(sample_en)
  );

endmodule
