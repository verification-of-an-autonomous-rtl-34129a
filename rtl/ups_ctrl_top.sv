// ups_ctrl_top: controller of one unit of an autonomous decentralized
// (communication-free) parallel single-phase UPS system.
//
// Every unit measures only its own output voltage and current. Per sampling
// period (20 kHz) the controller
//   1. filters both A/D samples (fir_filter),
//   2. runs three quasi dq transformations per signal in parallel, with
//      effective sampling rates of 20, 10 and 6.7 kHz (qdq_unit, J = 1..3),
//      and averages them (dq_average),
//   3. locks a PLL to the voltage: PI on the averaged Vd (pll_pi), phase
//      accumulator with sample-and-hold phases (vco), and refreshes the quasi
//      dq gains for the new frequency (gain_calc),
//   4. computes its active and reactive power (power_calc), applies the droop
//      characteristics (droop_ctrl) to get phase and amplitude references,
//      forms the instantaneous reference E* cos(theta_nom + phi*) on a
//      free-running 50 Hz time base (second vco instance at the nominal
//      frequency; vref_calc), turns it into a switch on-time (deadbeat_calc)
//      and
//   5. drives the H-bridge with dead-time-protected PWM (gate_drive).
// Load sharing between units follows from the droop alone; the share is set
// by each unit's rated powers p0/q0.
//
// The structure, the three-rate quasi dq transformation, the PLL and the
// droop equations follow the published design. In the published design steps 4 (power,
// droop, reference) run as software on a soft CPU; here they are hardware so
// the controller needs no processor. The A/D converter is external: adc_start
// asks for a conversion and the converter returns both samples with
// adc_valid. timing_ctrl reports in hw_cycles the clocks from adc_start to
// the end of the hardware calculation (step 2-3), which the published design gives
// as 73 clocks including the conversion.
//
// Clock 62 MHz (CLK_HZ), active-low asynchronous reset. The carrier period
// and all sampling-period timing scale with CLK_HZ / FS_HZ.
module ups_ctrl_top
  import ups_pkg::*;
#(
  parameter int unsigned CLK_HZ = CLK_HZ_DEFAULT,
  parameter int unsigned FS_HZ  = FS_HZ_DEFAULT,
  parameter int          DEAD   = 62           // PWM dead time, clocks (1 us)
) (
  input  logic               clk,
  input  logic               rst_n,
  // A/D converter
  output logic               adc_start,
  input  logic               adc_valid,
  input  sample_t            v_adc,
  input  sample_t            i_adc,
  // droop settings of this unit
  input  power_t             p0,
  input  power_t             q0,
  input  data_t              e0,
  input  angle_t             phi0,
  input  logic signed [31:0] m_gain,
  input  logic signed [31:0] n_gain,
  // inverter gates {B low, B high, A low, A high}
  output logic [3:0]         gate,
  // status
  output freq_t              freq,
  output data_t              v_amp,
  output data_t              i_amp,
  output angle_t             phi_i,
  output power_t             p_out,
  output power_t             q_out,
  output angle_t             phi_ref,
  output data_t              e_ref,
  output data_t              vref,
  output logic [11:0]        d_time,
  output logic               irq,
  output logic [11:0]        hw_cycles,
  output logic               overrun
);
  localparam int PERIOD = CLK_HZ / FS_HZ;

  // ---------------- timing ----------------
  logic tick, hw_done;
  timing_ctrl #(.CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ)) u_timing (
    .clk, .rst_n, .hw_done, .tick, .irq, .hw_cycles, .overrun
  );
  assign adc_start = tick;

  // ---------------- FIR filters ----------------
  logic    fv_valid, fi_valid;
  sample_t fv, fi;
  fir_filter u_fir_v (.clk, .rst_n, .in_valid(adc_valid), .din(v_adc), .out_valid(fv_valid), .dout(fv));
  fir_filter u_fir_i (.clk, .rst_n, .in_valid(adc_valid), .din(i_adc), .out_valid(fi_valid), .dout(fi));

  // ---------------- PLL phase and gains ----------------
  angle_t theta;
  angle_t theta_hold [NUM_RATES];
  gain_t  kh [NUM_RATES];

  // ---------------- quasi dq transformations ----------------
  logic [NUM_RATES-1:0] qv_valid, qi_valid;
  dq_t                  qv [NUM_RATES];
  dq_t                  qi [NUM_RATES];

  for (genvar j = 0; j < NUM_RATES; j++) begin : g_qdq
    qdq_unit #(.J(j + 1)) u_qdq_v (
      .clk, .rst_n, .in_valid(fv_valid), .din(fv), .theta(theta_hold[j]), .kh(kh[j]),
      .out_valid(qv_valid[j]), .dq(qv[j])
    );
    qdq_unit #(.J(j + 1)) u_qdq_i (
      .clk, .rst_n, .in_valid(fi_valid), .din(fi), .theta(theta_hold[j]), .kh(kh[j]),
      .out_valid(qi_valid[j]), .dq(qi[j])
    );
  end

  logic av_valid, ai_valid;
  dq_t  v_dq, i_dq;
  dq_average u_avg_v (.clk, .rst_n, .in_valid(&qv_valid), .dq_in(qv), .out_valid(av_valid), .dq_out(v_dq));
  dq_average u_avg_i (.clk, .rst_n, .in_valid(&qi_valid), .dq_in(qi), .out_valid(ai_valid), .dq_out(i_dq));

  // ---------------- PLL ----------------
  logic pll_valid, gain_done;
  pll_pi u_pll (.clk, .rst_n, .in_valid(av_valid), .vd(v_dq.d), .out_valid(pll_valid), .freq);
  vco #(.FS_HZ(FS_HZ)) u_vco (.clk, .rst_n, .tick, .freq, .theta, .theta_hold);
  gain_calc #(.FS_HZ(FS_HZ)) u_gain (.clk, .rst_n, .start(pll_valid), .freq, .done(gain_done), .kh);

  assign hw_done = pll_valid;

  // nominal-frequency time base of the output-voltage reference
  angle_t theta_nom;
  angle_t theta_nom_hold [1];
  vco #(.FS_HZ(FS_HZ), .NJ(1)) u_nominal (.clk, .rst_n, .tick, .freq(freq_t'(F_NOM_HZ << 16)),
                                          .theta(theta_nom), .theta_hold(theta_nom_hold));

  // ---------------- power, droop, reference ----------------
  logic pw_valid, dr_valid, vr_done, db_done;
  power_calc u_power (.clk, .rst_n, .in_valid(av_valid && ai_valid), .v(v_dq), .i(i_dq),
                      .out_valid(pw_valid), .p(p_out), .q(q_out));
  droop_ctrl u_droop (.clk, .rst_n, .in_valid(pw_valid), .p(p_out), .q(q_out), .p0, .q0,
                      .m_gain, .n_gain, .phi0, .e0, .out_valid(dr_valid), .phi_ref, .e_ref);
  vref_calc u_vref (.clk, .rst_n, .start(dr_valid), .theta(theta_nom), .phi_ref, .e_ref, .done(vr_done), .vref);

  // newest raw samples for the deadbeat stage
  sample_t v_last, i_last;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_last <= '0;
      i_last <= '0;
    end else if (adc_valid) begin
      v_last <= v_adc;
      i_last <= i_adc;
    end
  end

  deadbeat_calc #(.PERIOD(PERIOD)) u_db (.clk, .rst_n, .start(vr_done), .vref, .v(v_last), .i(i_last),
                                         .done(db_done), .d_time);
  gate_drive #(.PERIOD(PERIOD), .DEAD(DEAD)) u_gate (.clk, .rst_n, .sync(tick), .d_valid(db_done), .d_time, .gate);

  assign v_amp = v_dq.amp;
  assign i_amp = i_dq.amp;
  assign phi_i = i_dq.phase - v_dq.phase;

  logic unused;
  assign unused = ^{gain_done, theta, theta_nom_hold[0]};

endmodule
