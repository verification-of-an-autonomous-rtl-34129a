// cordic: iterative CORDIC engine, used for the dq rotation, for amplitude and
// phase detection, and for the sinusoidal voltage reference.
//
// Rotation mode (vectoring = 0): rotates (x_in, y_in) counter-clockwise by the
// binary angle z_in; x_out = x cos z - y sin z, y_out = x sin z + y cos z.
// Vectoring mode (vectoring = 1): x_out = sqrt(x^2 + y^2),
// z_out = z_in + atan2(y_in, x_in), y_out ~ 0.
// Angles: 2^16 counts = 2*pi. A quadrant pre-rotation by 180 degrees gives the
// full angle range; the CORDIC gain (1.6468) is removed by a final multiply by
// 39797/2^16. Internal datapath is W+2 bits wide.
//
// Timing: start is sampled for one cycle; done pulses ITER+2 cycles later with
// the outputs valid from then until the next start. start while busy is
// ignored. The published design names the dq transformation and "E cos(th+ph)" but not
// how they are computed; the CORDIC is this design's choice.
module cordic #(
  parameter int W    = 20,
  parameter int ITER = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                vectoring,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic        [15:0]  z_in,
  output logic                done,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out,
  output logic        [15:0]  z_out
);
  localparam int IW = W + 2;
  localparam int CW = $clog2(ITER + 1);

  // atan(2^-i) * 2^16 / (2*pi), rounded.
  localparam logic [15:0] ATAN [16] = '{
    16'd8192, 16'd4836, 16'd2555, 16'd1297, 16'd651, 16'd326, 16'd163, 16'd81,
    16'd41,   16'd20,   16'd10,   16'd5,    16'd3,   16'd1,   16'd1,   16'd0
  };
  localparam logic signed [17:0] KCOMP = 18'sd39797;   // 2^16 / 1.64676

  logic signed [IW-1:0] x, y;
  logic        [15:0]   z;
  logic                 mode;
  logic        [CW-1:0] step;
  logic                 busy, fin;

  logic signed [IW-1:0] xs, ys;
  logic                 dir;          // 1: rotate counter-clockwise
  always_comb begin
    xs  = x >>> step;
    ys  = y >>> step;
    dir = mode ? y[IW-1] : ~z[15];
  end

  function automatic logic signed [W-1:0] comp(input logic signed [IW-1:0] v);
    logic signed [IW+18-1:0] p;
    p = (v * KCOMP) >>> 16;
    return W'(p);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; mode <= 1'b0; step <= '0;
      busy <= 1'b0; fin <= 1'b0; done <= 1'b0;
      x_out <= '0; y_out <= '0; z_out <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start && !busy) begin
        mode <= vectoring;
        step <= '0;
        busy <= 1'b1;
        if (vectoring) begin
          if (x_in < 0) begin
            x <= -IW'(x_in); y <= -IW'(y_in); z <= z_in + 16'h8000;
          end else begin
            x <= IW'(x_in);  y <= IW'(y_in);  z <= z_in;
          end
        end else begin
          // bring z into (-90, +90] degrees
          if (z_in[15] != z_in[14]) begin
            x <= -IW'(x_in); y <= -IW'(y_in); z <= z_in + 16'h8000;
          end else begin
            x <= IW'(x_in);  y <= IW'(y_in);  z <= z_in;
          end
        end
      end else if (busy) begin
        if (dir) begin
          x <= x - ys; y <= y + xs; z <= z - ATAN[step[3:0]];
        end else begin
          x <= x + ys; y <= y - xs; z <= z + ATAN[step[3:0]];
        end
        if (step == CW'(ITER - 1)) begin
          busy <= 1'b0;
          fin  <= 1'b1;
        end
        step <= step + 1'b1;
      end
      if (fin) begin
        x_out <= comp(x);
        y_out <= comp(y);
        z_out <= z;
        done  <= 1'b1;
      end
    end
  end

endmodule
