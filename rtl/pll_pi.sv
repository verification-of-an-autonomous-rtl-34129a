// pll_pi: PI controller of the phase-locked loop.
//
// As drawn in the published design, the averaged d component of the output voltage is
// compared with zero and the PI output is added to the 50 Hz nominal
// frequency:  f = F_NOM + KP*e + sum(KI*e),  e = 0 - Vd.
// With the dq convention of qdq_unit, Vd = V cos(psi) and the loop settles
// with theta 90 degrees behind the voltage (Vq = +V). Gains are not given in
// the published design; the defaults give about 20 Hz loop bandwidth and 0.7 damping
// for a half-scale (16384-count) voltage, and scale with the amplitude.
// The output is clamped to F_MIN_HZ..F_MAX_HZ and the integrator stops at the
// clamp (anti-windup); both limits are this design's choice.
//
// Units: freq is Q16.16 Hz; KP is in 2^-16 Hz per count, KI in 2^-32 Hz per
// count per update. Interface: vd is taken when in_valid is high; freq and
// out_valid follow one clock later.
module pll_pi
  import ups_pkg::*;
#(
  parameter int unsigned F_NOM_HZ_P = F_NOM_HZ,
  parameter int unsigned F_MIN_HZ   = 40,
  parameter int unsigned F_MAX_HZ   = 60,
  parameter int          KP         = 115,
  parameter int          KI         = 33000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t vd,
  output logic  out_valid,
  output freq_t freq
);
  localparam longint FNOM = longint'(F_NOM_HZ_P) <<< 16;
  localparam longint FMIN = longint'(F_MIN_HZ)   <<< 16;
  localparam longint FMAX = longint'(F_MAX_HZ)   <<< 16;
  localparam longint IMAX = (FMAX - FNOM) <<< 16;  // integrator limits, 2^-32 Hz
  localparam longint IMIN = (FMIN - FNOM) <<< 16;

  logic signed [63:0] integ;         // 2^-32 Hz
  logic signed [63:0] e, integ_n, f_n;

  always_comb begin
    e       = -64'(vd);
    integ_n = integ + e * 64'(KI);
    if (integ_n > IMAX) integ_n = IMAX;
    if (integ_n < IMIN) integ_n = IMIN;
    f_n = FNOM + e * 64'(KP) + (integ_n >>> 16);
    if (f_n > FMAX) f_n = FMAX;
    if (f_n < FMIN) f_n = FMIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= '0;
      freq      <= freq_t'(FNOM);
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        integ <= integ_n;
        freq  <= freq_t'(f_n);
      end
    end
  end

endmodule
