// droop_ctrl: droop characteristics that set the phase and amplitude
// references of this UPS from its own output power.
//
//   phi* = phi0 - m * (P0 - P)        E* = E0 - n * (Q0 - Q)
//
// These are the published design's droop equations. P0 and Q0 are the rated powers
// that set this unit's share of the load; m and n are signed Q16.16 gains
// (phi in binary-angle counts per power unit, E in counts per power unit).
// For the falling phase-versus-power characteristic of the published design's droop
// figure, m must be negative. The phase correction is clamped to +-90 degrees
// and E* to 0..131071 counts; the limits are this design's choice. In the
// published design this block is software on the soft CPU; here it is hardware.
//
// Interface: p and q taken when in_valid is high; phi_ref, e_ref and
// out_valid one clock later.
module droop_ctrl
  import ups_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  power_t             p,
  input  power_t             q,
  input  power_t             p0,
  input  power_t             q0,
  input  logic signed [31:0] m_gain,
  input  logic signed [31:0] n_gain,
  input  angle_t             phi0,
  input  data_t              e0,
  output logic               out_valid,
  output angle_t             phi_ref,
  output data_t              e_ref
);
  localparam longint DPHI_MAX = 16384;     // 90 degrees
  localparam longint E_MAX    = 131071;

  logic signed [63:0] dp, dq_, dphi, de, e_n;
  always_comb begin
    dp   = 64'(p0) - 64'(p);
    dq_  = 64'(q0) - 64'(q);
    dphi = (dp * 64'(m_gain)) >>> 16;
    de   = (dq_ * 64'(n_gain)) >>> 16;
    if (dphi >  DPHI_MAX) dphi =  DPHI_MAX;
    if (dphi < -DPHI_MAX) dphi = -DPHI_MAX;
    e_n = 64'(e0) - de;
    if (e_n > E_MAX) e_n = E_MAX;
    if (e_n < 0)     e_n = 0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      phi_ref   <= '0;
      e_ref     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        phi_ref <= phi0 - angle_t'(dphi);
        e_ref   <= data_t'(e_n);
      end
    end
  end

endmodule
