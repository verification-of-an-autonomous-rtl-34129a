// qdq_unit: quasi dq transformation of a single-phase waveform for one
// sampling period J*Ts.
//
// From three samples V(k), V(k-J) and V(k-2J) of v = V cos(wt) the unit forms
//   alpha = V(k-J)                          ~ V cos(w t')
//   beta  = (V(k-2J) - V(k)) * KH           ~ V sin(w t'),  t' = t - J*Ts,
// where KH = 1/(2 w J Ts) comes from the gain calculation. (alpha, beta) is an
// orthogonal pair, so an ordinary dq rotation by the PLL phase theta of sample
// k-J gives
//   d =  alpha cos(theta) + beta sin(theta)
//   q = -alpha sin(theta) + beta cos(theta)
// followed by amplitude sqrt(d^2+q^2) and phase atan2(q, d). The equations and
// the three branches J = 1, 2, 3 (20, 10, 6.7 kHz) follow the published design; the
// delay-line reading of the branches (each branch updates at every 20 kHz
// sample), the dq sign convention and the use of one shared iterative CORDIC
// for the rotation and the amplitude/phase are this design's choices.
//
// Interface: a sample is taken when in_valid is high; theta and kh must be
// stable from then until out_valid. out_valid pulses 2*(CORDIC latency)+4
// = 40 clocks after in_valid with dq (d, q, amp, phase) valid until the next
// result. A new in_valid while busy is ignored.
module qdq_unit
  import ups_pkg::*;
#(
  parameter int J = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t din,
  input  angle_t  theta,
  input  gain_t   kh,
  output logic    out_valid,
  output dq_t     dq
);
  localparam int CWD = DATA_W + 2;

  typedef enum logic [2:0] {S_IDLE, S_BETA, S_ROT, S_ROT_WAIT, S_VEC, S_VEC_WAIT} state_t;
  state_t state;

  sample_t hist [2*J+1];            // hist[n] = V(k-n)
  data_t   alpha, beta;
  data_t   d_r, q_r;

  logic                  c_start, c_vec, c_done;
  logic signed [CWD-1:0] c_xi, c_yi, c_xo, c_yo;
  logic [15:0]           c_zi, c_zo;

  cordic #(.W(CWD), .ITER(16)) u_cordic (
    .clk, .rst_n, .start(c_start), .vectoring(c_vec),
    .x_in(c_xi), .y_in(c_yi), .z_in(c_zi),
    .done(c_done), .x_out(c_xo), .y_out(c_yo), .z_out(c_zo)
  );

  always_comb begin
    c_start = (state == S_ROT) || (state == S_VEC);
    c_vec   = (state == S_VEC);
    c_xi    = c_vec ? CWD'(d_r) : CWD'(alpha);
    c_yi    = c_vec ? CWD'(q_r) : CWD'(beta);
    c_zi    = c_vec ? 16'd0     : (16'd0 - theta);   // rotate by -theta
  end

  logic signed [SAMPLE_W:0] diff;
  logic signed [47:0]       prod;
  always_comb begin
    diff = (SAMPLE_W+1)'(hist[2*J]) - (SAMPLE_W+1)'(hist[0]);
    prod = (48'(diff) * $signed({16'd0, kh})) >>> 16;
  end

  function automatic data_t sat_c(input logic signed [CWD-1:0] v);
    return sat_data(48'(v));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      for (int n = 0; n <= 2*J; n++) hist[n] <= '0;
      alpha     <= '0;
      beta      <= '0;
      d_r       <= '0;
      q_r       <= '0;
      out_valid <= 1'b0;
      dq        <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          hist[0] <= din;
          for (int n = 1; n <= 2*J; n++) hist[n] <= hist[n-1];
          state <= S_BETA;
        end
        S_BETA: begin
          alpha <= data_t'(hist[J]);
          beta  <= sat_data(prod);
          state <= S_ROT;
        end
        S_ROT: state <= S_ROT_WAIT;
        S_ROT_WAIT: if (c_done) begin
          d_r   <= sat_c(c_xo);
          q_r   <= sat_c(c_yo);
          state <= S_VEC;
        end
        S_VEC: state <= S_VEC_WAIT;
        S_VEC_WAIT: if (c_done) begin
          dq.d      <= d_r;
          dq.q      <= q_r;
          dq.amp    <= sat_c(c_xo);
          dq.phase  <= c_zo;
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
