// deadbeat_calc: turns the voltage reference into the switch on-time D_TIME of
// the next PWM carrier period.
//
// The published design names this stage (deadbeat calculation, also drawn as a PI
// calculation producing dT) and shows its inputs, the reference and the
// measured output voltage and current, but gives no law. This design uses a
// feed-forward of the reference plus proportional voltage-error and
// load-current terms,
//   u = vref + KV/256 * (vref - v) + KI/256 * i,
// and converts u to the on-time of the bipolar PWM stage,
//   D_TIME = PERIOD/2 * (1 + u / VDC),   clamped to 0..PERIOD,
// where VDC is the DC-link voltage in A/D counts.
//
// Interface: inputs taken when start is high; done and d_time two clocks later.
module deadbeat_calc
  import ups_pkg::*;
#(
  parameter int PERIOD = CLK_HZ_DEFAULT / FS_HZ_DEFAULT,
  parameter int VDC    = 32000,
  parameter int KV     = 128,
  parameter int KI     = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  data_t       vref,
  input  sample_t     v,
  input  sample_t     i,
  output logic        done,
  output logic [11:0] d_time
);
  // PERIOD/2/VDC in Q16
  localparam longint GAIN = (longint'(PERIOD) <<< 15) / longint'(VDC);

  logic               stage;
  logic signed [47:0] u;
  logic signed [63:0] d_w;

  always_comb begin
    d_w = (longint'(PERIOD) / 2) + ((64'(u) * 64'(GAIN)) >>> 16);
    if (d_w < 0)                d_w = 0;
    if (d_w > longint'(PERIOD)) d_w = longint'(PERIOD);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage  <= 1'b0;
      u      <= '0;
      done   <= 1'b0;
      d_time <= 12'(PERIOD / 2);
    end else begin
      stage <= start;
      done  <= stage;
      if (start)
        u <= 48'(vref)
           + ((48'(KV) * (48'(vref) - 48'(v))) >>> 8)
           + ((48'(KI) * 48'(i)) >>> 8);
      if (stage) d_time <= 12'(d_w);
    end
  end

endmodule
