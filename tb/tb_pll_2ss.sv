// Self-checking testbench of the 2SS-PLL.
//
// A grid voltage V*sin(2*pi*f*t + p) with optional Gaussian-like noise is
// rectified and quantised as the sensing path would (12-bit code of |v|,
// polarity bit) and fed to the PLL once per sampling period. The checks
// compare the PLL against the true grid phase and frequency, which the
// testbench knows independently:
//   - steady-state lock at 50 Hz (phase error and frequency),
//   - quadrature output beta against -V*cos(theta_g),
//   - noise of 5 % of V_g,
//   - a frequency jump 49 -> 51 Hz, a +60 degree phase jump and a 50 % dip,
//   - a distorted grid: 2 % DC offset, 3 % 3rd and 2 % 5th harmonic, noise,
//   - the processing latency (done within LAT_MAX cycles of sample_en).
// The clock is divided by CLK_DIV = 100 cycles per sample to keep the run
// short; the PLL itself is at its default parameters.
`timescale 1ns/1ps
module tb_pll_2ss;
  import pll_pkg::*;

  localparam int    CLK_DIV = 100;
  localparam int    LAT_MAX = 90;
  localparam real   TS      = 156.25e-6;
  localparam real   TWO_PI  = 2.0 * 3.141592653589793;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_en = 1'b0;
  logic [11:0] adc_vg;
  logic polarity;
  q_t alpha, beta, vd, vq, delta, sin_t, cos_t;
  phase_t theta;
  logic freq_limited, busy, done;

  pll_2ss dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real amp = 1.0, freq = 50.0, ph = 0.0, noise = 0.0, dc = 0.0, h3 = 0.0, h5 = 0.0;
  real theta_g;                     // true grid phase at the current sample
  int  lat, lat_max_seen = 0;

  function automatic real q2r(q_t v); return real'(v) / 2.0**QF; endfunction

  function automatic real wrap(real a);
    while (a >  180.0) a -= 360.0;
    while (a < -180.0) a += 360.0;
    return a;
  endfunction

  function automatic real gauss();  // sum of uniforms, unit variance
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Phase error in degrees between the grid and the PLL, taken after the
  // sample has been processed: theta then refers to the next instant, so the
  // grid phase one step ahead is used.
  real perr;
  // One sampling period: present a sample, wait for done, measure.
  task automatic step();
    real v;
    theta_g = theta_g + TWO_PI * freq * TS;
    v = amp * $sin(theta_g + ph) + noise * gauss() + dc
        + h3 * $sin(3.0 * (theta_g + ph)) + h5 * $sin(5.0 * (theta_g + ph));
    polarity = (v >= 0.0);
    adc_vg   = 12'($rtoi(((v >= 0.0) ? v : -v) * 3500.0 + 0.5));
    @(posedge clk); sample_en <= 1'b1;
    @(posedge clk); sample_en <= 1'b0;
    lat = 1;
    while (!done) begin @(posedge clk); lat++; end
    if (lat > lat_max_seen) lat_max_seen = lat;
    perr = wrap((theta_g + ph + TWO_PI * freq * TS) * 360.0 / TWO_PI
                - real'(theta) * 360.0 / 2.0**32);
    repeat (CLK_DIV - lat - 2) @(posedge clk);
  endtask

  task automatic run(int n); repeat (n) step(); endtask

  // Mean |phase error| and peak over n samples, plus frequency.
  real sum_e, pk_e, f_mean;
  task automatic measure(int n);
    sum_e = 0.0; pk_e = 0.0; f_mean = 0.0;
    repeat (n) begin
      step();
      f_mean += f_pll() / n;
      sum_e += (perr < 0.0) ? -perr : perr;
      if (((perr < 0.0) ? -perr : perr) > pk_e) pk_e = (perr < 0.0) ? -perr : perr;
    end
    sum_e = sum_e / n;
  endtask

  function automatic real f_pll(); return q2r(delta) / (TWO_PI * TS); endfunction

  initial begin
    #(64'd3_000_000_000); // watchdog (3 s simulated)
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real b_err, b_max;
    theta_g = 0.0; adc_vg = '0; polarity = 1'b1;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);

    // Lock from a 30 degree offset at 50 Hz, clean grid.
    ph = TWO_PI * 30.0 / 360.0;
    run(3200);
    measure(640);
    $display("clean 50 Hz: mean %f deg peak %f deg f=%f Hz", sum_e, pk_e, f_mean);
    check(sum_e < 1.0, "clean lock: mean phase error");
    check(pk_e < 1.5, "clean lock: peak phase error");
    check(f_mean > 49.95 && f_mean < 50.05, "clean lock: frequency");
    check(lat_max_seen <= LAT_MAX, "latency within bound");
    $display("latency %0d cycles", lat_max_seen);

    // Quadrature signal. The exact discrete smoother response at the grid
    // frequency, G = gamma / (1 - (1-gamma) e^{-j d}), gives the smoothed
    // sample s = |G| V sin(theta_g + arg G); the two-sample QSG is exact for
    // a sinusoid, so beta' = -|G| V cos(theta_g + arg G). The compensation
    // uses the continuous-time model of the smoother:
    //   beta = beta' * r (1 + t^2) - alpha * t,  r = -ln(1-gamma)/gamma,
    //   t = d / ln(1-gamma).
    // Against -V cos(theta_g) this leaves an error of ~0.05 pu, which the
    // model predicts; the residual against bref comes from the frequency
    // ripple of the locked PLL, which the coefficients follow.
    b_max = 0.0;
    repeat (256) begin
      real d, gr, gi, gm, gp, r, t, bp, bref;
      step();
      d   = TWO_PI * freq * TS;
      gr  = 1.0 - (1.0 - 1.0/32.0) * $cos(d);
      gi  = (1.0 - 1.0/32.0) * $sin(d);
      gm  = (1.0/32.0) / $sqrt(gr*gr + gi*gi);
      gp  = -$atan2(gi, gr);
      r   = -$ln(1.0 - 1.0/32.0) * 32.0;
      t   = d / $ln(1.0 - 1.0/32.0);
      bp  = -gm * amp * $cos(theta_g + ph + gp);
      bref = bp * r * (1.0 + t*t) - amp * $sin(theta_g + ph) * t;
      b_err = q2r(beta) - bref;
      if (b_err < 0.0) b_err = -b_err;
      if (b_err > b_max) b_max = b_err;
    end
    $display("beta max error %f pu", b_max);
    check(b_max < 0.01, "quadrature signal against the model");
    check(q2r(vd) > 0.95 && q2r(vd) < 1.05, "amplitude estimate vd");

    // Noise of 5 % of V_g.
    noise = 0.05;
    run(1280);
    measure(1280);
    $display("noise 5%%: mean %f deg peak %f deg", sum_e, pk_e);
    check(sum_e < 1.5, "noisy grid: mean phase error");
    check(pk_e < 4.0, "noisy grid: peak phase error");

    // Frequency jump 49 -> 51 Hz under noise.
    freq = 49.0;
    run(3200);
    check(f_pll() > 48.8 && f_pll() < 49.2, "tracks 49 Hz");
    freq = 51.0;
    run(3200);
    measure(640);
    $display("after 49->51 Hz jump: mean %f deg f=%f Hz", sum_e, f_mean);
    check(sum_e < 1.5, "frequency jump: phase error settles");
    check(f_mean > 50.95 && f_mean < 51.05, "tracks 51 Hz");

    // +60 degree phase jump.
    freq = 50.0;
    run(3200);
    ph = ph + TWO_PI * 60.0 / 360.0;
    run(1600);
    measure(640);
    $display("after phase jump: mean %f deg", sum_e);
    check(sum_e < 1.5, "phase jump: phase error settles");

    // 50 % dip for 200 ms.
    amp = 0.5;
    run(1280);
    measure(640);
    $display("during dip: mean %f deg", sum_e);
    check(sum_e < 3.0, "voltage dip: stays locked");
    amp = 1.0;
    run(1600);
    measure(640);
    check(sum_e < 1.5, "after dip: phase error");

    // Distorted grid: 2 % DC offset, 3 % third and 2 % fifth harmonic, with
    // the 5 % noise still on.
    dc = 0.02; h3 = 0.03; h5 = 0.02;
    run(1280);
    measure(1280);
    $display("DC + harmonics + noise: mean %f deg peak %f deg", sum_e, pk_e);
    check(sum_e < 2.0, "distorted grid: mean phase error");
    check(pk_e < 5.0, "distorted grid: peak phase error");
    check(f_mean > 49.9 && f_mean < 50.1, "distorted grid: frequency");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
