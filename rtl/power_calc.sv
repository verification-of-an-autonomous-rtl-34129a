// power_calc: active and reactive output power of the UPS from the averaged
// dq components of its output voltage and current.
//
//   P = (Vd*Id + Vq*Iq) / 2,   Q = (Vq*Id - Vd*Iq) / 2   (divided by 2^16)
//
// The published design forms P from the voltage and current amplitudes and Q from the
// voltage amplitude and the current phase; with the PLL locked (Vd = 0,
// Vq = V) the expressions above reduce to exactly those products,
// P = V*I*cos(phi)/2 and Q = V*I*sin(phi)/2 (lagging current positive), and
// stay correct while the PLL is still settling. In the published design this block is
// software on the soft CPU; here it is one clock of hardware.
//
// Interface: inputs taken when in_valid is high; p, q, out_valid one clock later.
module power_calc
  import ups_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  dq_t    v,
  input  dq_t    i,
  output logic   out_valid,
  output power_t p,
  output power_t q
);
  logic signed [2*DATA_W:0] vd, vq, id, iq, p_w, q_w;
  always_comb begin
    vd  = (2*DATA_W+1)'(v.d);
    vq  = (2*DATA_W+1)'(v.q);
    id  = (2*DATA_W+1)'(i.d);
    iq  = (2*DATA_W+1)'(i.q);
    p_w = vd * id + vq * iq;
    q_w = vq * id - vd * iq;
  end

  // amplitudes and phases are carried in dq_t but not needed here
  logic unused;
  assign unused = ^{v.amp, v.phase, i.amp, i.phase};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p <= '0;
      q <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        p <= power_t'(p_w >>> 17);
        q <= power_t'(q_w >>> 17);
      end
    end
  end

endmodule
