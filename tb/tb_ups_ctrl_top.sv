// tb_ups_ctrl_top: end-to-end test of one UPS controller at its default
// parameters (62 MHz clock, 20 kHz sampling).
//
// The testbench plays the A/D converter: 20 clocks after each adc_start it
// returns samples of a 16000-count, 50.5 Hz output voltage and of the output
// current. The current is 8000 counts lagging 30 degrees for the first
// NPHASE sampling periods and then steps to 14000 counts in phase (a load
// change). At the end of each phase the detected frequency, amplitudes,
// current phase and powers are compared with values worked out from the
// waveforms, the droop outputs with the droop equations, the reference
// with E* cos(2 pi 50 Hz t + phi*), and the PWM on-times with d_time. The
// hardware latency from adc_start (including the 20-clock conversion) must
// stay within 73 clocks and the whole chain within 13.6 us. Each mechanism
// (PLL lock away from 50 Hz, gain recalculation, load step, droop response,
// dead time, one irq per period) must occur at least once. A third phase
// switches the load ten times per 50 Hz cycle and requires the detected
// power to settle within 12 samples of every step.
module tb_ups_ctrl_top;
  import ups_pkg::*;
  localparam real PI     = 3.14159265358979323846;
  localparam real FG     = 50.5;
  localparam real VA     = 16000.0;
  localparam int  PERIOD = 3100;
  localparam int  ADC_LAT = 20;
  localparam int  NPHASE = 3000;        // sampling periods per load phase
  localparam int  DEAD   = 62;

  logic clk = 1'b0, rst_n = 1'b0;
  always #8 clk = ~clk;

  logic    adc_start, adc_valid = 1'b0;
  sample_t v_adc = '0, i_adc = '0;
  power_t  p0 = 1000, q0 = 0;
  data_t   e0 = 16000;
  angle_t  phi0 = 16'd0;
  logic signed [31:0] m_gain = -32'sd65536, n_gain = -32'sd131072;
  logic [3:0]  gate;
  freq_t       freq;
  data_t       v_amp, i_amp, e_ref, vref;
  angle_t      phi_i, phi_ref;
  power_t      p_out, q_out;
  logic [11:0] d_time, hw_cycles;
  logic        irq, overrun;

  ups_ctrl_top dut (.*);

  int checks = 0, failures = 0;
  int n_rapid = 0, n_lock = 0, n_kh = 0, n_step = 0, n_droop = 0, n_dead = 0, n_irq = 0, n_ticks = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction
  function automatic real wrap_deg(input real a);
    while (a > 180.0) a -= 360.0;
    while (a < -180.0) a += 360.0;
    return a;
  endfunction

  // ---------------- A/D converter model ----------------
  int  k = 0;
  real ia = 8000.0, lag = 30.0;
  always @(posedge clk) begin
    if (adc_start && rst_n) begin
      n_ticks++;
      fork begin
        automatic int kk = k;
        automatic real ph = 2.0 * PI * FG * real'(kk) / 20000.0 + 1.0;
        k++;
        repeat (ADC_LAT - 1) @(posedge clk);
        v_adc     <= sample_t'($rtoi(VA * $cos(ph)));
        i_adc     <= sample_t'($rtoi(ia * $cos(ph - lag * PI / 180.0)));
        adc_valid <= 1'b1;
        @(posedge clk);
        adc_valid <= 1'b0;
      end join_none
    end
  end

  // ---------------- timing monitors ----------------
  int since_tick = 0, worst_chain = 0, worst_hw = 0;
  always @(posedge clk) begin
    since_tick = adc_start ? 0 : since_tick + 1;
    if (dut.u_db.done && since_tick > worst_chain) worst_chain = since_tick;
    if (irq && rst_n) begin
      n_irq++;
      if (int'(hw_cycles) > worst_hw) worst_hw = int'(hw_cycles);
    end
    if (dut.u_gain.done && dut.kh[0] != dut.u_gain.KH50[31:0]) n_kh++;
  end

  // PWM: A-high clocks per carrier period vs the on-time in force
  int high = 0, dt_prev = PERIOD / 2, dt_in_force = PERIOD / 2, dt_loaded = PERIOD / 2, pwm_bad = 0, pwm_seen = 0;
  int off_run = 0;
  always @(posedge clk) if (rst_n) begin
    if (gate[0] || gate[1]) begin
      if (off_run >= DEAD) n_dead++;
      off_run = 0;
    end else off_run++;
    if (adc_start) begin
      // periods next to a saturated on-time have no dead-time gap at the edge
      if (n_ticks > 10 && dt_in_force > DEAD + 5 && dt_in_force < PERIOD - DEAD - 5 &&
          dt_prev < PERIOD - DEAD - 5) begin
        pwm_seen++;
        if (high < dt_in_force - DEAD - 3 || high > dt_in_force - DEAD + 3) begin
          pwm_bad++;
          $display("PWM period %0d: A high %0d clocks, on-time %0d", n_ticks, high, dt_in_force);
        end
      end
      high = 0;
      dt_prev = dt_in_force;
      dt_in_force = dt_loaded;
    end
    if (gate[0]) high++;
    if (dut.u_db.done) dt_loaded = int'(d_time);
  end

  // ---------------- end-of-phase checks ----------------
  real last_p = 0.0;
  angle_t last_phi = '0;
  task automatic phase_checks(input string tag);
    real g, ev, ei, ep, eq, fv, cs, sn, vr_ph, vr_amp, exp_ph;
    int kk0, ephi, ee;
    // gain of the 4-tap moving average at FG
    g = $sin(4.0 * PI * FG / 20000.0) / (4.0 * $sin(PI * FG / 20000.0));
    ev = VA * g;
    ei = ia * g;
    ep = ev * ei * $cos(lag * PI / 180.0) / 2.0 / 65536.0;
    eq = ev * ei * $sin(lag * PI / 180.0) / 2.0 / 65536.0;
    fv = real'(freq) / 65536.0;
    $display("%s: f=%f Vamp=%0d Iamp=%0d phi_i=%f P=%0d Q=%0d phi*=%0d E*=%0d hw=%0d chain=%0d",
             tag, fv, int'(v_amp), int'(i_amp), real'($signed(phi_i)) * 360.0 / 65536.0, int'(p_out),
             int'(q_out), int'($signed(phi_ref)), int'(e_ref), worst_hw, worst_chain);
    check(fabs(fv - FG) < 0.05, $sformatf("%s frequency %f", tag, fv));
    if (fabs(fv - FG) < 0.05) n_lock++;
    check(fabs(real'(v_amp) - ev) < 0.01 * ev, $sformatf("%s Vamp %0d exp %f", tag, v_amp, ev));
    check(fabs(real'(i_amp) - ei) < 0.01 * ei, $sformatf("%s Iamp %0d exp %f", tag, i_amp, ei));
    check(fabs(wrap_deg(real'(phi_i) * 360.0 / 65536.0 + lag)) < 1.0,
          $sformatf("%s current phase %0d", tag, phi_i));
    check(fabs(real'(p_out) - ep) < 0.02 * ep + 3.0, $sformatf("%s P %0d exp %f", tag, p_out, ep));
    check(fabs(real'(q_out) - eq) < 0.03 * ev * ei / 2.0 / 65536.0 + 3.0,
          $sformatf("%s Q %0d exp %f", tag, q_out, eq));
    // droop equations on the design's own P and Q
    ephi = (int'(phi0) - int'($floor(real'(int'(p0) - int'(p_out)) * real'(int'(m_gain)) / 65536.0))) & 65535;
    ee   = int'(e0) - int'($floor(real'(int'(q0) - int'(q_out)) * real'(int'(n_gain)) / 65536.0));
    check(int'(phi_ref) == ephi, $sformatf("%s phi* %0d exp %0d", tag, phi_ref, ephi));
    check(int'(e_ref) == ee, $sformatf("%s E* %0d exp %0d", tag, e_ref, ee));
    // reference: amplitude and phase over the last 400 samples
    cs = 0.0; sn = 0.0; vr_amp = 0.0;
    kk0 = k;
    for (int s = 0; s < 400; s++) begin
      @(posedge dut.u_db.done);
      if (fabs(real'(vref)) > vr_amp) vr_amp = fabs(real'(vref));
      // nominal 50 Hz time base: k sampling periods since reset
      cs += real'(vref) * $cos(2.0 * PI * 50.0 * real'(k) / 20000.0);
      sn += real'(vref) * $sin(2.0 * PI * 50.0 * real'(k) / 20000.0);
    end
    vr_ph = $atan2(-sn, cs) * 180.0 / PI;
    exp_ph = real'($signed(phi_ref)) * 360.0 / 65536.0;
    check(fabs(vr_amp - real'(e_ref)) < 0.01 * real'(e_ref), $sformatf("%s vref peak %f", tag, vr_amp));
    check(fabs(wrap_deg(vr_ph - exp_ph)) < 0.5, $sformatf("%s vref phase %f exp %f", tag, vr_ph, exp_ph));
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    // phase 1: 8000 counts lagging 30 degrees
    wait (k >= NPHASE - 400);
    phase_checks("load 1");
    last_p = real'(p_out);
    last_phi = phi_ref;
    // phase 2: load step
    ia = 14000.0;
    lag = 0.0;
    wait (k >= 2 * NPHASE - 400);
    phase_checks("load 2");
    if (real'(p_out) > 1.5 * last_p) n_step++;
    // more load than P0 must pull phi* down (m < 0)
    if ($signed(phi_ref) < $signed(last_phi)) n_droop++;
    // phase 3: rapid load change, ten steps per 50 Hz cycle (every 40 samples);
    // the detected power must settle within 5 % in at most 12 samples (0.6 ms)
    for (int st = 0; st < 20; st++) begin
      real ep3;
      int settle;
      ia = (st % 2 == 0) ? 8000.0 : 14000.0;
      ep3 = VA * ia / 2.0 / 65536.0;
      settle = -1;
      for (int s = 0; s < 40; s++) begin
        @(posedge irq);
        repeat (30) @(posedge clk);
        if (settle < 0 && fabs(real'(p_out) - ep3) < 0.05 * ep3) settle = s + 1;
        if (settle >= 0 && fabs(real'(p_out) - ep3) >= 0.05 * ep3) settle = -1;
      end
      if (settle > 0) n_rapid++;
      check(settle > 0 && settle <= 12, $sformatf("rapid step %0d: P settled after %0d samples", st, settle));
    end
    check(worst_hw <= 73, $sformatf("hardware latency %0d clocks", worst_hw));
    check(worst_chain * 16 <= 13600, $sformatf("calculation chain %0d clocks", worst_chain));
    check(!overrun, "overrun");
    check(n_irq >= n_ticks - 2, $sformatf("irq %0d for %0d periods", n_irq, n_ticks));
    check(pwm_seen > 100 && pwm_bad == 0, $sformatf("PWM on-time mismatches %0d of %0d", pwm_bad, pwm_seen));
    $display("mechanisms: rapid=%0d lock=%0d gain_update=%0d load_step=%0d droop=%0d dead_time=%0d irq=%0d",
             n_rapid, n_lock, n_kh, n_step, n_droop, n_dead, n_irq);
    check(n_lock == 2, "PLL lock");
    check(n_rapid == 20, "rapid load changes");
    check(n_kh > 0, "gain recalculation");
    check(n_step > 0, "load step");
    check(n_droop > 0, "droop response");
    check(n_dead > 0, "dead time");
    check(n_irq > 0, "irq");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((2 * NPHASE + 1000) * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
