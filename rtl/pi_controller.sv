// Discrete PI controller with output and integrator limits.
//
// On every en strobe, with error e_k:
//     I_k = clamp(I_{k-1} + OUT_SCALE*KI*TS*e_k, OUT_MIN, OUT_MAX)
//     y_k = clamp(OUT_SCALE*KP*e_k + I_k,        OUT_MIN, OUT_MAX)
// (forward-Euler integrator; the clamp on I_k keeps it from winding up).
// OUT_SCALE rescales the output unit: the PLL loop filter uses OUT_SCALE = TS
// so that a gain in rad/s per unit error yields a phase step per sample.
//
// The gains are turned into fixed point at elaboration with 32 fractional
// bits; the integrator keeps 40 fractional bits. The same module serves as
// the PLL loop filter (KP = 46, KI = 1024, as in the document) and as the
// current and DC-voltage controllers of the PFC, whose gains the document
// does not give. The limits and the anti-windup clamp are this design's.
//
// Interface: err is read on en; y and sat (y was limited) are registered.
module pi_controller
  import pll_pkg::*;
#(
  parameter real KP        = 46.0,
  parameter real KI        = 1024.0,
  parameter real TS        = 156.25e-6,
  parameter real OUT_SCALE = 1.0,
  parameter real OUT_MIN   = -1.0,
  parameter real OUT_MAX   = 1.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  q_t   err,
  output q_t   y,
  output logic sat
);

  localparam int GF = 32;          // fractional bits of the gains
  localparam int AF = QF + 16;     // fractional bits of the integrator
  localparam int PW = QW + 64;     // product width

  typedef logic signed [63:0] acc_t;
  typedef logic signed [PW-1:0] prod_t;

  localparam acc_t KP_I   = acc_t'(longint'(KP * OUT_SCALE * 2.0**GF));
  localparam acc_t KI_I   = acc_t'(longint'(KI * TS * OUT_SCALE * 2.0**GF));
  localparam acc_t LO_A   = acc_t'(longint'(OUT_MIN * 2.0**AF));
  localparam acc_t HI_A   = acc_t'(longint'(OUT_MAX * 2.0**AF));
  localparam q_t   LO_Q   = to_q(OUT_MIN);
  localparam q_t   HI_Q   = to_q(OUT_MAX);

  function automatic acc_t sat_acc(prod_t v);
    if (v > prod_t'(HI_A))      return HI_A;
    else if (v < prod_t'(LO_A)) return LO_A;
    else                        return acc_t'(v);
  endfunction

  acc_t  integ;
  acc_t  integ_next;
  prod_t p_term;
  prod_t sum;
  q_t    y_next;
  logic  sat_next;

  always_comb begin
    prod_t i_term;
    prod_t y_full;
    i_term     = (prod_t'(err) * prod_t'(KI_I)) >>> (QF + GF - AF);
    p_term     = (prod_t'(err) * prod_t'(KP_I)) >>> (QF + GF - AF);
    integ_next = sat_acc(prod_t'(integ) + i_term);
    sum        = p_term + prod_t'(integ_next);
    y_full     = sum >>> (AF - QF);
    if (y_full > prod_t'(HI_Q)) begin
      y_next   = HI_Q;
      sat_next = 1'b1;
    end else if (y_full < prod_t'(LO_Q)) begin
      y_next   = LO_Q;
      sat_next = 1'b1;
    end else begin
      y_next   = q_t'(y_full);
      sat_next = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0;
      y     <= '0;
      sat   <= 1'b0;
    end else if (en) begin
      integ <= integ_next;
      y     <= y_next;
      sat   <= sat_next;
    end
  end

endmodule
