// End-to-end testbench of pfc_controller. To keep the run short the clock
// is divided by PWM_PERIOD = 500 cycles per sample instead of 15625 (the
// controller needs about 60); everything else is at its defaults, and the
// grid and plant advance per sample, so the control behaviour is that of the
// full-size design. tb_pfc_controller_full runs the defaults unchanged.
//
// The controller closes its loops around an averaged model of a totem-pole
// boost PFC, in per unit of the grid peak voltage and of 1 pu current:
//     tau_L di/dt  = v_g - s (1-d) v_o       (s = +1/-1: boosting switch)
//     tau_C dvo/dt = (1-d) |i| - v_o / R
// with tau_L = 150 us, tau_C = 32.5 ms, R = 4 pu; the inductor current is
// held at zero where the diode of the other leg would block it. The duty d
// of each period is measured from pwm_out itself, and the model then
// produces the ADC codes for the next sampling instant (rectified grid
// voltage and polarity, offset-binary current, output voltage).
//
// Scenario (grid time): start-up with v_o precharged to the grid peak, lock
// and regulation at 50 Hz, 5 % noise, a 49 -> 51 Hz frequency jump, a +90
// degree phase jump and a 50 % dip of 200 ms. Checks: PLL phase error
// against the true grid phase, DC-voltage regulation, power factor of the
// modelled line current, the pulse count of every PWM period against the
// duty command, the sampling period, and that each mechanism occurred
// (the power-factor bound of 0.85 reflects the placeholder PFC loop gains,
// not the PLL):
// voltage-loop limit, current-loop limit, PLL frequency limit, both half
// cycles, noise, frequency jump, phase jump and dip.
`timescale 1ns/1ps
module tb_pfc_controller;
  import pll_pkg::*;

  localparam int  P      = 500;
  localparam real TS     = 156.25e-6;
  localparam real TWO_PI = 6.283185307179586;
  localparam real TAU_L  = 150e-6;
  localparam real TAU_C  = 32.5e-3;
  localparam real R_LOAD = 4.0;
  localparam real VREF   = 1.23;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] adc_vg = '0, adc_il = 12'd2048, adc_vo = '0;
  logic polarity = 1'b1;
  q_t vdc_ref;
  logic adc_trigger, pwm_out, half_cycle;
  q_t sin_theta, pll_delta, i_amp, i_ref, duty;
  phase_t pll_theta;
  logic pll_freq_limited, v_loop_sat, i_loop_sat;

  pfc_controller #(.PWM_PERIOD(P)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Grid and plant state.
  real amp = 1.0, freq = 50.0, noise = 0.0;
  real th_g = 0.0;          // grid phase at the present sampling instant
  real v_now = 0.0;         // grid voltage at that instant
  real i_l = 0.0, v_o = 1.0;

  function automatic real gauss();
    real s = 0.0;
    for (int n = 0; n < 12; n++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  function automatic real wrap(real a);
    while (a >  180.0) a -= 360.0;
    while (a < -180.0) a += 360.0;
    return a;
  endfunction

  // Statistics, reset by the scenario.
  int  n_win = 0;
  real e_sum = 0.0, vo_sum = 0.0, p_sum = 0.0, vv_sum = 0.0, ii_sum = 0.0;
  real perr = 0.0;
  // Mechanism counters.
  int  n_vsat = 0, n_isat = 0, n_fsat = 0, n_pos = 0, n_neg = 0;
  int  n_noise = 0, n_fjump = 0, n_pjump = 0, n_dip = 0;
  int  n_periods = 0, n_pwm_bad = 0, n_trig_bad = 0;

  // PWM pulse measurement: each period starts at the rising edge of
  // adc_trigger (pwm_out is registered with the same lag); the pulse is high
  // first, so its width is the time from the period start to its fall.
  int     highs = 0, want_highs = -1;
  q_t     duty_cmd;
  realtime t_per = 0, t_fall = 0, t_prev = 0;

  always @(negedge pwm_out) t_fall = $realtime;

  initial begin
    vdc_ref = to_q(VREF);
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
  end

  // Per-period process, driven by the sampling strobe.
  initial begin
    @(posedge rst_n);
    forever begin
      @(posedge adc_trigger);
      t_per = $realtime;
      if (n_periods > 0 && t_per - t_prev != P * 10.0) n_trig_bad++;
      t_prev = t_per;
      n_periods++;
      #(P / 2 * 10);
      duty_cmd = duty;
      if (v_loop_sat) n_vsat++;
      if (i_loop_sat) n_isat++;
      if (pll_freq_limited) n_fsat++;
      if (half_cycle) n_pos++; else n_neg++;
      // theta now refers to the next sampling instant.
      perr = wrap((th_g + TWO_PI * freq * TS) * 360.0 / TWO_PI
                  - real'(pll_theta) * 360.0 / 2.0**32);
      #((P - P / 2 - 5) * 10);
      if (pwm_out)              highs = P;
      else if (t_fall > t_per)  highs = int'((t_fall - t_per) / 10.0);
      else                      highs = 0;
      advance();
    end
  end

  // End of the period: check its pulse count, run the plant over it and
  // present the samples of the next instant.
  task automatic advance();
    real d, dt, v, s, di;
    // A pulse still high this close to the end runs to the end.
    if (want_highs >= 0) begin
      if (highs != want_highs && !(want_highs > P - 8 && highs == P)) n_pwm_bad++;
    end
    d = real'(highs) / real'(P);
    // Command of this period applies to the next one.
    if (duty_cmd <= 0) want_highs = 0;
    else if (duty_cmd >= Q_ONE) want_highs = P;
    else want_highs = int'((longint'(duty_cmd) * P) >>> QF);
    // Plant over one period, 8 Euler steps.
    dt = TS / 8.0;
    s  = half_cycle ? 1.0 : -1.0;
    for (int n = 0; n < 8; n++) begin
      v  = amp * $sin(th_g + TWO_PI * freq * dt * n);
      di = (v - s * (1.0 - d) * v_o) / TAU_L * dt;
      i_l = i_l + di;
      if (s > 0.0 && i_l < 0.0) i_l = 0.0;
      if (s < 0.0 && i_l > 0.0) i_l = 0.0;
      v_o = v_o + ((1.0 - d) * ((i_l < 0.0) ? -i_l : i_l) - v_o / R_LOAD) / TAU_C * dt;
    end
    th_g  = th_g + TWO_PI * freq * TS;
    if (th_g > TWO_PI) th_g -= TWO_PI;
    v_now = amp * $sin(th_g) + noise * gauss();
    // Statistics of the instant.
    n_win++;
    e_sum  += (perr < 0.0) ? -perr : perr;
    vo_sum += v_o;
    p_sum  += amp * $sin(th_g) * i_l;
    vv_sum += amp * amp * $sin(th_g) * $sin(th_g);
    ii_sum += i_l * i_l;
    // ADC codes.
    polarity <= (v_now >= 0.0);
    adc_vg   <= 12'(clip($rtoi(((v_now < 0.0) ? -v_now : v_now) * 3500.0 + 0.5)));
    adc_il   <= 12'(clip(2048 + $rtoi(i_l * 1000.0 + ((i_l < 0.0) ? -0.5 : 0.5))));
    adc_vo   <= 12'(clip($rtoi(v_o * 2500.0 + 0.5)));
  endtask

  function automatic int clip(int c);
    return (c < 0) ? 0 : (c > 4095) ? 4095 : c;
  endfunction

  task automatic periods(int n);
    repeat (n) @(posedge adc_trigger);
  endtask

  task automatic window_start();
    n_win = 0; e_sum = 0.0; vo_sum = 0.0; p_sum = 0.0; vv_sum = 0.0; ii_sum = 0.0;
  endtask

  real pf, vo_m, e_m;
  task automatic window_end(string name);
    e_m  = e_sum / n_win;
    vo_m = vo_sum / n_win;
    pf   = (p_sum / n_win) / $sqrt((vv_sum / n_win) * (ii_sum / n_win) + 1e-12);
    $display("%-22s phase err %6.3f deg  v_o %6.4f pu  PF %6.4f  f %7.3f Hz", name, e_m,
             vo_m, pf, real'(pll_delta) / 2.0**QF / (TWO_PI * TS));
  endtask

  initial begin
    #(64'd100_000_000);  // watchdog: 20000 sampling periods
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    // Start-up and lock, clean 50 Hz grid.
    periods(2560);
    window_start(); periods(640); window_end("steady 50 Hz");
    check(e_m < 0.5, "steady: PLL phase error");
    check(vo_m > VREF * 0.99 && vo_m < VREF * 1.01, "steady: DC voltage regulated");
    check(pf > 0.85, "steady: power factor");

    // 5 % noise.
    noise = 0.05; n_noise++;
    periods(640);
    window_start(); periods(640); window_end("noise 5 %");
    check(e_m < 1.5, "noise: PLL phase error");
    check(pf > 0.85, "noise: power factor");

    // Frequency jump 49 -> 51 Hz.
    freq = 49.0; periods(1280);
    freq = 51.0; n_fjump++;
    periods(1920);
    window_start(); periods(320); window_end("after 49->51 Hz");
    check(e_m < 1.5, "frequency jump: PLL phase error");
    check(vo_m > VREF * 0.98 && vo_m < VREF * 1.02, "frequency jump: DC voltage");

    // +90 degree phase jump.
    freq = 50.0; periods(640);
    th_g = th_g + TWO_PI / 4.0; n_pjump++;
    periods(1280);
    window_start(); periods(320); window_end("after phase jump");
    check(e_m < 1.5, "phase jump: PLL phase error");

    // 50 % dip, 200 ms.
    amp = 0.5; n_dip++;
    window_start(); periods(1280); window_end("during dip");
    check(e_m < 3.0, "dip: PLL stays locked");
    check(vo_m > VREF * 0.85, "dip: DC voltage held");
    amp = 1.0;
    periods(1280);
    window_start(); periods(320); window_end("after dip");
    check(e_m < 1.5, "after dip: PLL phase error");
    check(vo_m > VREF * 0.96 && vo_m < VREF * 1.04, "after dip: DC voltage recovering");

    // Per-period checks and mechanism counts.
    $display("periods %0d, PWM mismatches %0d, trigger spacing errors %0d",
             n_periods, n_pwm_bad, n_trig_bad);
    $display("mechanisms: v-limit %0d  i-limit %0d  f-limit %0d  pos %0d  neg %0d  noise %0d  fjump %0d  pjump %0d  dip %0d",
             n_vsat, n_isat, n_fsat, n_pos, n_neg, n_noise, n_fjump, n_pjump, n_dip);
    check(n_pwm_bad == 0, "PWM pulse widths follow the duty command");
    check(n_trig_bad == 0, "sampling period of PWM_PERIOD cycles");
    check(n_vsat > 0, "voltage-loop limit reached");
    check(n_isat > 0, "current-loop limit reached");
    check(n_fsat > 0, "PLL frequency limit reached");
    check(n_pos > 0 && n_neg > 0, "both half cycles");
    check(n_noise > 0 && n_fjump > 0 && n_pjump > 0 && n_dip > 0, "all grid events applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
