// tb_parallel_ups: parallel operation of three controllers sharing one load.
//
// Three ups_ctrl_top instances run from one clock. A behavioural model of
// the power stage closes the loop: each inverter is an ideal averaged
// H-bridge (its output over a carrier period is VDC*(2*d_time/PERIOD - 1),
// the LC filter is taken as ideal), and each unit feeds a common bus through
// a line impedance R_LINE + L_LINE and a switch; the bus carries a resistive
// load. The A/D model samples each unit's terminal voltage and line current
// (full scale +-50 V and +-5 A) 20 clocks after adc_start. All controllers
// run at their default parameters: a coarser carrier would quantize the
// output voltage too much for the quasi dq transformation.
//
// Sequence: the units first run 3000 periods with droop off so that every
// PLL locks, then droop is enabled with the gains scaled as m = -M/P0 and
// n = -N/P0 (M = 3 deg, N = 2 % of E0 at rated power), so that the units
// share in the ratio of their rated powers:
//   1. units 1 and 2 on the bus, rated powers 62.5 W : r * 62.5 W for
//      r = 0.5, 0.75, 1, 1.5, 2, 2.5, 3 (the two-unit share-ratio series);
//   2. unit 3 plugged in with all three at 62.5 W (1:1:1);
//   3. unit 3 unplugged again;
//   4. rapid load change with units 1 and 2 at 1:1: a second 10 ohm load is
//      switched in and out every 2 ms (ten changes per 50 Hz cycle), 40 times.
// Checks: the measured balance P2/P1 leans the same way as r, does not
// overshoot it, rises with r, and is 1 within 5 % for r = 1; the three units
// share within 10 % of their mean; a plugged-in unit takes load and an
// unplugged one drops to zero while the others take it over; during the
// rapid load change the two output currents stay within 10 % of the peak
// load current of each other, and both units follow every step. Steeper droop
// slopes than 3 deg oscillate with this line model, so the balance follows
// the setting only partly (1:2 gives about 1:1.3). Line and load values are
// this testbench's own, since the experiment does not state them; the load
// draws about 60 W at 25 V rms, close to the experiment's total.
module tb_parallel_ups;
  import ups_pkg::*;
  localparam int  NU       = 3;
  localparam int  CLK_HZ   = CLK_HZ_DEFAULT;
  localparam int  PERIOD   = CLK_HZ_DEFAULT / FS_HZ_DEFAULT;
  localparam int  ADC_LAT  = 20;
  localparam real TS       = 1.0 / 20000.0;
  localparam real VDC_V    = 32000.0 * 50.0 / 32767.0;   // DC link = VDC counts
  localparam real KV       = 32767.0 / 50.0;             // counts per volt
  localparam real KIA      = 32767.0 / 5.0;              // counts per ampere
  localparam real W_UNIT   = KV * KIA / 65536.0;         // power units per watt
  localparam real R_LINE   = 0.2;
  localparam real L_LINE   = 2.0e-3;
  localparam real P_RATED  = 62.5;
  localparam real M_DEG    = 3.0;                        // phase droop at P = P0
  localparam real N_FRAC   = 0.02;                       // amplitude droop at Q = P0

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    adc_start [NU];
  logic    adc_valid = 1'b0;
  sample_t v_adc [NU];
  sample_t i_adc [NU];
  power_t  p0 [NU];
  logic signed [31:0] m_gain [NU];
  logic signed [31:0] n_gain [NU];
  logic [3:0]  gate [NU];
  freq_t       freq [NU];
  data_t       v_amp [NU], i_amp [NU], e_ref [NU], vref [NU];
  angle_t      phi_i [NU], phi_ref [NU];
  power_t      p_out [NU], q_out [NU];
  logic [11:0] d_time [NU], hw_cycles [NU];
  logic        irq [NU], overrun [NU];

  for (genvar u = 0; u < NU; u++) begin : g_ups
    ups_ctrl_top dut (
      .clk, .rst_n, .adc_start(adc_start[u]), .adc_valid, .v_adc(v_adc[u]), .i_adc(i_adc[u]),
      .p0(p0[u]), .q0(32'sd0), .e0(data_t'(23170)), .phi0(16'd0),
      .m_gain(m_gain[u]), .n_gain(n_gain[u]),
      .gate(gate[u]), .freq(freq[u]), .v_amp(v_amp[u]), .i_amp(i_amp[u]), .phi_i(phi_i[u]),
      .p_out(p_out[u]), .q_out(q_out[u]), .phi_ref(phi_ref[u]), .e_ref(e_ref[u]), .vref(vref[u]),
      .d_time(d_time[u]), .irq(irq[u]), .hw_cycles(hw_cycles[u]), .overrun(overrun[u])
    );
  end

  int checks = 0, failures = 0;
  function automatic real fabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction
  int n_plug_in = 0, n_plug_out = 0, n_ratio = 0, n_rapid = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  bit droop_on = 1'b0;
  task automatic set_rating(input int u, input real watts);
    real pu;
    pu = watts * W_UNIT;
    p0[u]     = power_t'($rtoi(pu));
    m_gain[u] = droop_on ? -32'($rtoi(M_DEG / 360.0 * 65536.0 * 65536.0 / pu)) : 32'sd0;
    n_gain[u] = droop_on ? -32'($rtoi(N_FRAC * 23170.0 * 65536.0 / pu)) : 32'sd0;
  endtask

  // ---------------- power stage and A/D model ----------------
  real    il [NU];
  real    r_load = 10.0;                               // 10 ohm, or 5 ohm during load steps
  real    vinv [NU];
  bit     on [NU];
  real    d_prev [NU];
  int     nsamp = 0;
  initial for (int u = 0; u < NU; u++) begin
    il[u] = 0.0; vinv[u] = 0.0; on[u] = 1'b0; d_prev[u] = real'(PERIOD / 2);
    v_adc[u] = '0; i_adc[u] = '0;
  end

  always @(posedge clk) begin
    if (rst_n && adc_start[0]) begin
      real vbus, isum;
      // advance the plant over the period that just ended
      for (int u = 0; u < NU; u++) vinv[u] = VDC_V * (2.0 * d_prev[u] / real'(PERIOD) - 1.0);
      for (int s = 0; s < 40; s++) begin
        isum = 0.0;
        for (int u = 0; u < NU; u++) if (on[u]) isum += il[u];
        vbus = r_load * isum;
        for (int u = 0; u < NU; u++) begin
          if (on[u]) il[u] += (vinv[u] - R_LINE * il[u] - vbus) * (TS / 40.0) / L_LINE;
          else       il[u] = 0.0;
        end
      end
      for (int u = 0; u < NU; u++) d_prev[u] = real'(d_time[u]);
      nsamp++;
      fork begin
        repeat (ADC_LAT - 1) @(posedge clk);
        for (int u = 0; u < NU; u++) begin
          v_adc[u] <= sample_t'($rtoi(vinv[u] * KV));
          i_adc[u] <= sample_t'($rtoi(il[u] * KIA));
        end
        adc_valid <= 1'b1;
        @(posedge clk);
        adc_valid <= 1'b0;
      end join_none
    end
  end

  // ---------------- measurement ----------------
  real pw [NU];
  task automatic settle_and_measure(input int periods);
    real acc [NU];
    for (int u = 0; u < NU; u++) acc[u] = 0.0;
    repeat (periods) @(posedge irq[0]);
    for (int s = 0; s < 400; s++) begin
      @(posedge irq[0]);
      repeat (40) @(posedge clk);
      for (int u = 0; u < NU; u++) acc[u] += real'(p_out[u]) / W_UNIT;
    end
    for (int u = 0; u < NU; u++) pw[u] = acc[u] / 400.0;
  endtask

  initial begin
    real ratios [7] = '{0.5, 0.75, 1.0, 1.5, 2.0, 2.5, 3.0};
    real got, prev_got, mean, p12;
    for (int u = 0; u < NU; u++) set_rating(u, P_RATED);
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    on[0] = 1'b1;
    on[1] = 1'b1;
    // start-up: the units synchronise with droop off, then droop is enabled
    repeat (3000) @(posedge irq[0]);
    droop_on = 1'b1;
    for (int u = 0; u < NU; u++) set_rating(u, P_RATED);
    prev_got = 0.0;
    // 1. two units, share-ratio series
    for (int r = 0; r < 7; r++) begin
      set_rating(1, P_RATED * ratios[r]);
      settle_and_measure(1200);
      got = pw[1] / pw[0];
      $display("share 1:%0.2f  P1=%0.2f W  P2=%0.2f W  balance 1:%0.2f  f=%0.3f Hz",
               ratios[r], pw[0], pw[1], got, real'(freq[0]) / 65536.0);
      check(pw[0] > 5.0 && pw[1] > 5.0, "both units carry load");
      check(got > prev_got, $sformatf("ratio rises with the setting (%f after %f)", got, prev_got));
      if (ratios[r] != 1.0) begin
        check((got - 1.0) * (ratios[r] - 1.0) > 0.0, $sformatf("ratio %f leans towards setting %f", got, ratios[r]));
        if ((got - 1.0) * (ratios[r] - 1.0) > 0.0) n_ratio++;
      end else
        check(got > 0.95 && got < 1.05, "equal sharing at 1:1");
      check(fabs(got - 1.0) <= fabs(ratios[r] - 1.0) + 0.05, "ratio does not overshoot the setting");
      prev_got = got;
    end
    // 2. third unit plugged in, 1:1:1
    set_rating(1, P_RATED);
    settle_and_measure(1200);
    p12 = pw[0] + pw[1];
    on[2] = 1'b1;
    settle_and_measure(1200);
    mean = (pw[0] + pw[1] + pw[2]) / 3.0;
    $display("share 1:1:1  P1=%0.2f W  P2=%0.2f W  P3=%0.2f W  balance %0.2f : %0.2f : %0.2f",
             pw[0], pw[1], pw[2], 1.0, pw[1] / pw[0], pw[2] / pw[0]);
    for (int u = 0; u < NU; u++)
      check(pw[u] > 0.9 * mean && pw[u] < 1.1 * mean, $sformatf("unit %0d share %f of mean %f", u + 1, pw[u], mean));
    if (pw[2] > 0.5 * mean) n_plug_in++;
    check(pw[0] + pw[1] < 0.8 * p12, "units 1 and 2 hand load to unit 3");
    // 3. third unit unplugged
    on[2] = 1'b0;
    settle_and_measure(1200);
    $display("unplugged    P1=%0.2f W  P2=%0.2f W  P3=%0.2f W", pw[0], pw[1], pw[2]);
    check(pw[2] < 1.0 && pw[2] > -1.0, "unplugged unit carries no power");
    check(pw[0] + pw[1] > 0.9 * p12, "units 1 and 2 take the load back");
    if (pw[2] < 1.0 && pw[2] > -1.0) n_plug_out++;
    // 4. rapid load change, two units at 1:1
    begin
      real dev_max, ipk, p_mean;
      dev_max = 0.0; ipk = 0.0;
      for (int c = 0; c < 40; c++) begin
        r_load = (c % 2 == 0) ? 5.0 : 10.0;
        p_mean = 0.0;
        for (int s = 0; s < 40; s++) begin
          @(posedge irq[0]);
          repeat (40) @(posedge clk);
          if (fabs(il[0] - il[1]) > dev_max) dev_max = fabs(il[0] - il[1]);
          if (fabs(il[0] + il[1]) > ipk) ipk = fabs(il[0] + il[1]);
          if (s >= 20) p_mean += real'(p_out[0]) / W_UNIT / 20.0;
        end
        // after each step unit 1's reading sits at the new level (about 60 W
        // per unit at 5 ohm, 31 W at 10 ohm)
        if ((c % 2 == 0) ? (p_mean > 50.0) : (p_mean < 40.0)) n_rapid++;
      end
      $display("rapid load change: %0d of 40 steps followed, largest current difference %0.3f A of %0.3f A peak",
               n_rapid, dev_max, ipk);
      check(n_rapid == 40, "both load levels reached after every step");
      check(dev_max < 0.1 * ipk, "units share the current during rapid load change");
    end
    for (int u = 0; u < NU; u++) check(!overrun[u], "overrun");
    $display("mechanisms: ratio_settings=%0d plug_in=%0d plug_out=%0d rapid_steps=%0d", n_ratio, n_plug_in, n_plug_out, n_rapid);
    check(n_ratio > 0 && n_plug_in > 0 && n_plug_out > 0 && n_rapid > 0, "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (32000 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
