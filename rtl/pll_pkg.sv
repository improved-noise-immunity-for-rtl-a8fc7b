// Shared fixed-point types and helpers for the two-sample PLL with smoothing
// and the PFC controller around it.
//
// Every signal-path quantity is a signed Q8.24 number (q_t): 32 bits, 24 of
// them fractional, so the range is [-128, 128) with a step of 2^-24. Grid
// voltage, currents and the PLL's sine/cosine are per-unit values; the PLL
// frequency is carried as the phase step per sample, delta = omega * Ts, in
// radians. Phases are unsigned 32-bit fractions of a turn (2^32 = 2*pi).
//
// The word lengths are this design's choice; the document does not give any.
package pll_pkg;

  localparam int QW = 32;                 // word length of q_t
  localparam int QF = 24;                 // fractional bits of q_t

  typedef logic signed [QW-1:0] q_t;      // Q8.24 signal value
  typedef logic        [31:0]   phase_t;  // phase, 2^32 = one turn

  localparam real PI_R = 3.141592653589793;

  localparam q_t Q_ONE     = q_t'(1 <<< QF);
  localparam q_t Q_MAX     = q_t'({1'b0, {(QW-1){1'b1}}});
  localparam q_t Q_MIN     = q_t'({1'b1, {(QW-1){1'b0}}});

  // Real constant to Q8.24 (rounded). Used only at elaboration.
  function automatic q_t to_q(real r);
    return q_t'(longint'(r * 2.0**QF));
  endfunction

  // Q8.24 product, truncated toward minus infinity, saturated to the q_t range.
  function automatic q_t qmul(q_t a, q_t b);
    logic signed [2*QW-1:0] p;
    logic signed [2*QW-1:0] s;
    p = 64'(a) * 64'(b);
    s = p >>> QF;
    if (s > 64'(Q_MAX))      return Q_MAX;
    else if (s < 64'(Q_MIN)) return Q_MIN;
    else                     return q_t'(s);
  endfunction

  // Saturating Q8.24 addition and subtraction.
  function automatic q_t qadd(q_t a, q_t b);
    logic signed [QW:0] s;
    s = (QW+1)'(a) + (QW+1)'(b);
    if (s > (QW+1)'(Q_MAX))      return Q_MAX;
    else if (s < (QW+1)'(Q_MIN)) return Q_MIN;
    else                         return q_t'(s);
  endfunction

  function automatic q_t qsub(q_t a, q_t b);
    logic signed [QW:0] s;
    s = (QW+1)'(a) - (QW+1)'(b);
    if (s > (QW+1)'(Q_MAX))      return Q_MAX;
    else if (s < (QW+1)'(Q_MIN)) return Q_MIN;
    else                         return q_t'(s);
  endfunction

  function automatic q_t qclamp(q_t x, q_t lo, q_t hi);
    if (x < lo)      return lo;
    else if (x > hi) return hi;
    else             return x;
  endfunction

endpackage
