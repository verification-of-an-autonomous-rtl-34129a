// timing_ctrl: timing controller of the sampling period.
//
// A counter divides the clock into sampling periods of CLK_HZ/FS_HZ clocks
// (3100 clocks: 20 kHz at 62 MHz). At the start of each period it pulses
// tick, which starts the A/D conversion and restarts the PWM carrier. It
// counts the clocks from tick to hw_done, the end of the hardware
// calculation, and reports them in hw_cycles; at hw_done it pulses irq, the
// start signal of the calculation that follows (the published design's "CPU block
// start signal"). If a period ends before hw_done arrived, the sticky
// overrun flag is set. The published design names the timing controller and its
// control signals; which signals it makes is this design's choice. The
// 62 MHz clock is inferred from the published design's 73 clocks in 1.18 us.
module timing_ctrl
  import ups_pkg::*;
#(
  parameter int unsigned CLK_HZ = CLK_HZ_DEFAULT,
  parameter int unsigned FS_HZ  = FS_HZ_DEFAULT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hw_done,
  output logic        tick,
  output logic        irq,
  output logic [11:0] hw_cycles,
  output logic        overrun
);
  localparam int PERIOD = CLK_HZ / FS_HZ;
  localparam int CW     = $clog2(PERIOD);

  logic [CW-1:0] cnt;
  logic [11:0]   lat;
  logic          pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      tick      <= 1'b0;
      irq       <= 1'b0;
      lat       <= '0;
      hw_cycles <= '0;
      pending   <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      tick <= (cnt == '0);
      irq  <= 1'b0;
      cnt  <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      if (tick) begin
        if (pending) overrun <= 1'b1;
        pending <= 1'b1;
        lat     <= 12'd1;
      end else begin
        if (lat != '1) lat <= lat + 1'b1;
        if (hw_done && pending) begin
          pending   <= 1'b0;
          hw_cycles <= lat;
          irq       <= 1'b1;
        end
      end
    end
  end

endmodule
