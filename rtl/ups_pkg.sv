// ups_pkg: types and constants shared by the single-phase UPS controller.
//
// Number formats used throughout the controller:
//   sample_t  16-bit signed A/D sample (full scale +-32767 counts).
//   data_t    18-bit signed internal quantity (alpha/beta, d/q, amplitude,
//             voltage reference); two guard bits above the sample range.
//   angle_t   16-bit binary angle, 2^16 counts = 2*pi (wraps naturally).
//   freq_t    32-bit unsigned frequency, Q16.16 Hz (50 Hz = 50 << 16).
//   gain_t    32-bit unsigned quasi dq gain KH, Q16.16.
//   power_t   32-bit signed power: (1/2) V I in counts*counts, divided by 2^16.
// The 20 kHz sampling rate and the 50 Hz nominal frequency follow the
// published design; the clock rate and all word widths are this design's choice.
package ups_pkg;

  localparam int SAMPLE_W = 16;
  localparam int DATA_W   = 18;
  localparam int ANGLE_W  = 16;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [DATA_W-1:0]   data_t;
  typedef logic        [ANGLE_W-1:0]  angle_t;
  typedef logic        [31:0]         freq_t;
  typedef logic        [31:0]         gain_t;
  typedef logic signed [31:0]         power_t;

  // Output of one quasi dq transformation: rotating-frame components,
  // amplitude and phase atan2(q, d).
  typedef struct packed {
    data_t  d;
    data_t  q;
    data_t  amp;
    angle_t phase;
  } dq_t;

  localparam int unsigned CLK_HZ_DEFAULT = 62_000_000;
  localparam int unsigned FS_HZ_DEFAULT  = 20_000;
  localparam int unsigned F_NOM_HZ       = 50;
  localparam int          NUM_RATES      = 3;   // 20, 10 and 6.7 kHz branches

  localparam angle_t DEG90  = 16'h4000;
  localparam angle_t DEG180 = 16'h8000;

  // Saturate a wide signed value to data_t.
  function automatic data_t sat_data(input logic signed [47:0] v);
    if (v > 48'sd131071)       return data_t'(18'sd131071);
    else if (v < -48'sd131071) return data_t'(-18'sd131071);
    else                       return data_t'(v);
  endfunction

endpackage
