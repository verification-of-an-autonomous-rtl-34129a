// vco: numerically controlled oscillator of the PLL, with the sample-and-hold
// stages that hand each quasi dq unit its phase.
//
// A 32-bit phase accumulator advances once per sampling period (tick) by
// f / FS_HZ of a turn; its top 16 bits are theta (2^16 = 2*pi). The published design
// shows the VCO output passing through S/H stages to theta1..theta3; here
// theta_hold[j-1] holds theta of sample k-j, the phase the J = j quasi dq unit
// needs for its alpha sample V(k-j). The increment is f * round(2^32/FS) / 2^16
// (error about 2 ppm at 20 kHz).
//
// Interface: freq is Q16.16 Hz and is read on tick; theta and theta_hold
// change one clock after tick.
module vco
  import ups_pkg::*;
#(
  parameter int unsigned FS_HZ = FS_HZ_DEFAULT,
  parameter int          NJ    = NUM_RATES
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   tick,
  input  freq_t  freq,
  output angle_t theta,
  output angle_t theta_hold [NJ]
);
  localparam longint INC_MUL = (64'd1 <<< 32) / longint'(FS_HZ);

  logic [31:0] acc;
  logic [63:0] inc_w;
  always_comb inc_w = (64'(freq) * 64'(INC_MUL)) >> 16;

  assign theta = acc[31:16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      for (int j = 0; j < NJ; j++) theta_hold[j] <= '0;
    end else if (tick) begin
      acc           <= acc + inc_w[31:0];
      theta_hold[0] <= acc[31:16];
      for (int j = 1; j < NJ; j++) theta_hold[j] <= theta_hold[j-1];
    end
  end

endmodule
