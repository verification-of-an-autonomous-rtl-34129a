// fir_filter: low-pass FIR filter applied to each A/D sample stream before
// the quasi dq transformations.
//
// The published design places an FIR filter between the A/D converter and the quasi
// dq transformations but does not give its coefficients. This design uses a
// TAPS-point moving average (all coefficients 1/TAPS, TAPS a power of two), so
// the filter needs one adder and a shift. With TAPS = 4 at 20 kHz it passes
// 50 Hz with gain 0.996 and 1.5 samples (6.75 deg) of delay, the same for
// voltage and current, so power and phase difference are not disturbed.
//
// Interface: din is taken when in_valid is high; dout and out_valid follow one
// clock later. The filter memory is cleared by reset.
module fir_filter
  import ups_pkg::*;
#(
  parameter int TAPS = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t din,
  output logic    out_valid,
  output sample_t dout
);
  localparam int SH = $clog2(TAPS);
  localparam int AW = SAMPLE_W + SH;

  sample_t               taps [TAPS];
  logic signed [AW-1:0]  acc;     // running sum of the TAPS newest samples

  initial assert (TAPS == (1 << SH)) else $error("TAPS must be a power of two");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) taps[k] <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        taps[0] <= din;
        for (int k = 1; k < TAPS; k++) taps[k] <= taps[k-1];
        acc  <= acc + AW'(din) - AW'(taps[TAPS-1]);
        dout <= sample_t'((acc + AW'(din) - AW'(taps[TAPS-1])) >>> SH);
      end
    end
  end

endmodule
