// dq_average: mean of the outputs of the three quasi dq transformation units
// (20, 10 and 6.7 kHz branches) of one signal.
//
// The published design averages the three parallel results to reduce the effect of
// noise. d, q and amplitude are summed and divided by three (multiply by
// 43691 / 2^17, error below 1e-5). Phases are averaged as signed offsets from
// the first unit's phase so that values on both sides of +-180 degrees average
// correctly; that treatment of the phase is this design's choice.
//
// Interface: dq_in is taken when in_valid is high; out_valid and dq_out follow
// one clock later.
module dq_average
  import ups_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  dq_t  dq_in [NUM_RATES],
  output logic out_valid,
  output dq_t  dq_out
);
  localparam logic signed [18:0] INV3 = 19'sd43691;   // 2^17 / 3

  function automatic data_t mean3(input data_t a, input data_t b, input data_t c);
    logic signed [DATA_W+1:0]  s;
    logic signed [DATA_W+21:0] p;
    s = (DATA_W+2)'(a) + (DATA_W+2)'(b) + (DATA_W+2)'(c);
    p = ((DATA_W+22)'(s) * (DATA_W+22)'(INV3)) >>> 17;
    return data_t'(p);
  endfunction

  logic signed [ANGLE_W-1:0] off1, off2;
  logic signed [ANGLE_W+1:0] off_sum;
  logic signed [ANGLE_W+21:0] off_mean;
  always_comb begin
    off1     = $signed(dq_in[1].phase - dq_in[0].phase);
    off2     = $signed(dq_in[2].phase - dq_in[0].phase);
    off_sum  = (ANGLE_W+2)'(off1) + (ANGLE_W+2)'(off2);
    off_mean = ((ANGLE_W+22)'(off_sum) * (ANGLE_W+22)'(INV3)) >>> 17;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dq_out    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dq_out.d     <= mean3(dq_in[0].d,   dq_in[1].d,   dq_in[2].d);
        dq_out.q     <= mean3(dq_in[0].q,   dq_in[1].q,   dq_in[2].q);
        dq_out.amp   <= mean3(dq_in[0].amp, dq_in[1].amp, dq_in[2].amp);
        dq_out.phase <= dq_in[0].phase + angle_t'(off_mean);
      end
    end
  end

endmodule
