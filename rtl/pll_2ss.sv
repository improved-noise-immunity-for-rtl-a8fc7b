// Two-sample PLL with smoothing (2SS-PLL) for a single-phase grid.
//
// The in-quadrature signal of a single-phase PLL is made from only the last
// samples of the grid voltage: the input alpha_k is smoothed by a first-order
// filter (gamma = 2^-GAMMA_SHIFT), the two-sample QSG forms the 90-degree
// lagging signal from the smoothed samples s_k and s_{k-2}, and the gain and
// phase lag that the smoother adds at the PLL frequency are compensated
// before the Park phase detector. A PI loop filter turns the detector's vq
// into a correction of the phase step per sample, and a phase accumulator
// with a CORDIC is the oscillator. The QSG coefficients are recomputed from
// the PLL frequency after every sample.
//
//   adc_vg, polarity -> polarity_reconstruct -> alpha_k
//   alpha_k -> smoother -> qsg_2s -> beta'_k -> smooth_comp -> beta_k
//   (alpha_k, beta_k, sin/cos theta) -> park_pd -> vq -> pi_controller
//   delta = clamp(delta_nom + PI output) -> vco -> theta, sin, cos
//   delta -> qsg_coeff -> coefficients for the next sample
//
// Timing: one sample is processed per sample_en strobe. The sequence takes
// six cycles to the phase update and then about 2*QF+4 cycles while the
// CORDIC and the coefficient divider run in parallel; done pulses when sin_t,
// cos_t, theta and delta of the next sampling instant are all valid. The
// next sample_en must not come earlier (an assertion checks this); at the
// document's 6.4 kHz sampling rate and any clock above ~1 MHz this holds.
//
// Document values: Ts = 156.25 us, gamma = 0.03125, Kp = 46, Ki = 1024,
// 50 Hz grid. Own choices: Q8.24 arithmetic, the frequency limits F_MIN and
// F_MAX, per-unit scaling of the ADC code, and the sine reference (sin_t is
// in phase with the grid voltage).
module pll_2ss
  import pll_pkg::*;
#(
  parameter real TS          = 156.25e-6,
  parameter real F_NOM       = 50.0,
  parameter real F_MIN       = 40.0,
  parameter real F_MAX       = 60.0,
  parameter real KP          = 46.0,
  parameter real KI          = 1024.0,
  parameter int  GAMMA_SHIFT = 5,
  parameter int  ADC_BITS    = 12,
  parameter int  PEAK_CODE   = 3500,
  parameter int  ITER        = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_en,   // one cycle per sampling period
  input  logic [ADC_BITS-1:0] adc_vg,      // rectified grid voltage code
  input  logic                polarity,    // 1: positive half cycle
  output q_t                  alpha,       // reconstructed input, pu
  output q_t                  beta,        // compensated quadrature signal, pu
  output q_t                  vd,          // amplitude estimate, pu
  output q_t                  vq,          // phase detector output, pu
  output q_t                  delta,       // omega*Ts, rad per sample
  output phase_t              theta,       // PLL phase, 2^32 = one turn
  output q_t                  sin_t,       // sin(theta), in phase with the grid
  output q_t                  cos_t,
  output logic                freq_limited, // loop filter at its limit
  output logic                busy,
  output logic                done
);

  localparam real D_NOM_R = 2.0 * PI_R * F_NOM * TS;
  localparam q_t  D_NOM   = to_q(D_NOM_R);
  localparam q_t  D_MIN   = to_q(2.0 * PI_R * F_MIN * TS);
  localparam q_t  D_MAX   = to_q(2.0 * PI_R * F_MAX * TS);

  typedef enum logic [2:0] {
    S_IDLE, S_QSG, S_COMP, S_PD, S_LF, S_VCO, S_WAIT
  } state_t;

  state_t state;

  // Strobes of the processing steps.
  logic en_qsg, en_comp, en_pd, en_lf, en_vco;
  always_comb begin
    en_qsg  = (state == S_QSG);
    en_comp = (state == S_COMP);
    en_pd   = (state == S_PD);
    en_lf   = (state == S_LF);
    en_vco  = (state == S_VCO);
  end

  q_t   s_k, s_km1, beta_p;
  q_t   c_isin, c_tan, c_tphi, c_gain;
  q_t   dw;             // loop-filter output, correction of delta
  q_t   delta_next;
  logic coeff_busy, coeff_done;
  logic vco_busy, vco_done;

  polarity_reconstruct #(.ADC_BITS(ADC_BITS), .PEAK_CODE(PEAK_CODE)) u_rec (
    .clk(clk), .rst_n(rst_n), .en(sample_en && state == S_IDLE),
    .adc_code(adc_vg), .polarity(polarity), .alpha(alpha)
  );

  smoother #(.GAMMA_SHIFT(GAMMA_SHIFT)) u_smooth (
    .clk(clk), .rst_n(rst_n), .en(en_qsg),
    .alpha(alpha), .s_k(s_k), .s_km1(s_km1)
  );

  qsg_2s u_qsg (
    .clk(clk), .rst_n(rst_n), .en(en_qsg),
    .s_k(s_k), .s_km1(s_km1), .c_isin(c_isin), .c_tan(c_tan), .beta_p(beta_p)
  );

  smooth_comp u_comp (
    .clk(clk), .rst_n(rst_n), .en(en_comp),
    .beta_p(beta_p), .alpha(alpha), .c_gain(c_gain), .c_tphi(c_tphi), .beta(beta)
  );

  park_pd u_pd (
    .clk(clk), .rst_n(rst_n), .en(en_pd),
    .alpha(alpha), .beta(beta), .sin_t(sin_t), .cos_t(cos_t), .vd(vd), .vq(vq)
  );

  pi_controller #(
    .KP(KP), .KI(KI), .TS(TS), .OUT_SCALE(TS),
    .OUT_MIN(2.0 * PI_R * (F_MIN - F_NOM) * TS),
    .OUT_MAX(2.0 * PI_R * (F_MAX - F_NOM) * TS)
  ) u_lf (
    .clk(clk), .rst_n(rst_n), .en(en_lf), .err(vq), .y(dw), .sat(freq_limited)
  );

  always_comb delta_next = qclamp(qadd(D_NOM, dw), D_MIN, D_MAX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      delta <= D_NOM;
    else if (en_vco) delta <= delta_next;
  end

  vco #(.ITER(ITER)) u_vco (
    .clk(clk), .rst_n(rst_n), .en(en_vco), .delta(delta_next),
    .theta(theta), .sin_t(sin_t), .cos_t(cos_t), .busy(vco_busy), .done(vco_done)
  );

  qsg_coeff #(.TS(TS), .GAMMA_SHIFT(GAMMA_SHIFT), .F_NOM(F_NOM)) u_coeff (
    .clk(clk), .rst_n(rst_n), .start(en_vco), .delta(delta_next),
    .c_isin(c_isin), .c_tan(c_tan), .c_tphi(c_tphi), .c_gain(c_gain),
    .busy(coeff_busy), .done(coeff_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (sample_en) state <= S_QSG;
        S_QSG:  state <= S_COMP;
        S_COMP: state <= S_PD;
        S_PD:   state <= S_LF;
        S_LF:   state <= S_VCO;
        S_VCO:  state <= S_WAIT;
        S_WAIT: if (!vco_busy && !coeff_busy && !en_vco) begin
                  state <= S_IDLE;
                  done  <= 1'b1;
                end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // A new sample may only arrive once the previous one is fully processed.
  a_sample_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    sample_en |-> state == S_IDLE);

endmodule
