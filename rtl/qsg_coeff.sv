// Frequency-dependent coefficients of the two-sample QSG with smoothing.
//
// The QSG is tuned to the PLL frequency through N_k = 2*pi/(Ts*omega), i.e.
// through the phase step per sample delta = 2*pi/N_k = omega*Ts. From delta
// this block computes
//     c_isin = 1/sin(4*pi/N_k) = 1/sin(2*delta)
//     c_tan  = tan(2*pi/N_k)   = tan(delta)
//     c_tphi = tan(phi_k)      = delta / ln(1-gamma)
//     c_gain = 1/(H_k cos phi_k) = |ln(1-gamma)/gamma| * (1 + tan^2(phi_k))
// where H_k and phi_k are the smoother's gain and phase at the PLL frequency.
//
// How: 1/(2*delta) comes from a sequential divider (NW cycles); the rest are
// odd power series, accurate to about 1e-7 for delta below 0.1 rad
// (frequencies below ~100 Hz at 6.4 kHz sampling):
//     1/sin(x) = 1/x + x/6 + 7x^3/360,   tan(x) = x + x^3/3 + 2x^5/15.
// The c_gain expression follows from the document's H_k and phi_k: since
// tan(phi_k) = 2*pi/(N_k ln(1-gamma)), H_k cos(phi_k) = |gamma/ln(1-gamma)|
// * cos^2(phi_k). The series, the divider and the update schedule are this
// design's choices.
//
// Interface: start (one cycle) latches delta; about NW+2 cycles later the
// four outputs change together and done pulses. After reset the outputs
// hold the values for the nominal frequency F_NOM.
module qsg_coeff
  import pll_pkg::*;
#(
  parameter real TS          = 156.25e-6,
  parameter int  GAMMA_SHIFT = 5,
  parameter real F_NOM       = 50.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  q_t   delta,     // omega*Ts in rad, must be positive
  output q_t   c_isin,
  output q_t   c_tan,
  output q_t   c_tphi,
  output q_t   c_gain,
  output logic busy,
  output logic done
);

  localparam real GAMMA   = 2.0 ** (-GAMMA_SHIFT);
  localparam real LN1MG   = $ln(1.0 - GAMMA);            // ln(1-gamma) < 0
  localparam real D_NOM   = 2.0 * PI_R * F_NOM * TS;

  localparam q_t K_PHI    = to_q(1.0 / LN1MG);
  localparam q_t K_ATT    = to_q(-LN1MG / GAMMA);        // |ln(1-gamma)/gamma|
  localparam q_t K_1_6    = to_q(1.0 / 6.0);
  localparam q_t K_7_360  = to_q(7.0 / 360.0);
  localparam q_t K_1_3    = to_q(1.0 / 3.0);
  localparam q_t K_2_15   = to_q(2.0 / 15.0);
  localparam q_t D_FLOOR  = to_q(1.0e-3);                // keeps the divisor away from 0

  localparam q_t ISIN_NOM = to_q(1.0 / $sin(2.0 * D_NOM));
  localparam q_t TAN_NOM  = to_q($tan(D_NOM));
  localparam q_t TPHI_NOM = to_q(D_NOM / LN1MG);
  localparam q_t GAIN_NOM = to_q((-LN1MG / GAMMA) * (1.0 + (D_NOM / LN1MG) ** 2));

  localparam int NW = 2 * QF + 2;   // dividend 2^(2*QF) gives a Q8.24 quotient

  q_t              d_lat;
  q_t              x2;              // 2*delta
  logic [NW-1:0]   quot;
  logic            div_busy;
  logic            div_done;

  always_comb x2 = qadd(d_lat, d_lat);

  seq_divider #(.NW(NW), .DW(QW)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start && !busy),
    .dividend (NW'(1) << (2 * QF)),
    .divisor  ((delta < D_FLOOR) ? 32'(qadd(D_FLOOR, D_FLOOR)) : 32'(qadd(delta, delta))),
    .quotient (quot),
    .busy     (div_busy),
    .done     (div_done)
  );

  q_t inv_x, x3, d3, d5, isin_n, tan_n, tphi_n, gain_n;

  always_comb begin
    inv_x  = (quot > NW'(Q_MAX)) ? Q_MAX : q_t'(quot);
    x3     = qmul(qmul(x2, x2), x2);
    d3     = qmul(qmul(d_lat, d_lat), d_lat);
    d5     = qmul(qmul(d3, d_lat), d_lat);
    isin_n = qadd(qadd(inv_x, qmul(x2, K_1_6)), qmul(x3, K_7_360));
    tan_n  = qadd(qadd(d_lat, qmul(d3, K_1_3)), qmul(d5, K_2_15));
    tphi_n = qmul(d_lat, K_PHI);
    gain_n = qmul(K_ATT, qadd(Q_ONE, qmul(tphi_n, tphi_n)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_lat  <= to_q(D_NOM);
      c_isin <= ISIN_NOM;
      c_tan  <= TAN_NOM;
      c_tphi <= TPHI_NOM;
      c_gain <= GAIN_NOM;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        d_lat <= (delta < D_FLOOR) ? D_FLOOR : delta;
        busy  <= 1'b1;
      end else if (div_done) begin
        c_isin <= isin_n;
        c_tan  <= tan_n;
        c_tphi <= tphi_n;
        c_gain <= gain_n;
        busy   <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

endmodule
