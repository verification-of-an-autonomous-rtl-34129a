// vref_calc: instantaneous output-voltage reference of the inverter,
//
//   vref = E* cos(theta + phi*)
//
// where theta is the phase of the nominal-frequency time base (50 Hz, from
// the nominal-frequency oscillator in the top level) and phi* and E* are the
// droop references. The form E cos(th + ph) is the published design's. The cosine is
// produced by rotating (E*, 0) with a CORDIC. In the published design this block is
// software on the soft CPU; here it is hardware.
//
// Interface: inputs taken when start is high; done pulses 19 clocks later
// with vref valid until the next result.
module vref_calc
  import ups_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  angle_t theta,
  input  angle_t phi_ref,
  input  data_t  e_ref,
  output logic   done,
  output data_t  vref
);
  localparam int CWD = DATA_W + 2;

  logic                  c_done;
  logic signed [CWD-1:0] c_xo, c_yo;
  logic [15:0]           c_zo;

  cordic #(.W(CWD), .ITER(16)) u_cordic (
    .clk, .rst_n, .start, .vectoring(1'b0),
    .x_in(CWD'(e_ref)), .y_in('0), .z_in(theta + phi_ref),
    .done(c_done), .x_out(c_xo), .y_out(c_yo), .z_out(c_zo)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      vref <= '0;
    end else begin
      done <= c_done;
      if (c_done) vref <= sat_data(48'(c_xo));
    end
  end

  // y and residual angle of the rotation are not needed
  logic unused;
  assign unused = ^{c_yo, c_zo};

endmodule
