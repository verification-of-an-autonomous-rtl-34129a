// gate_drive: pulse generation and gate drive for the single-phase H-bridge.
//
// Bipolar PWM: a counter runs over one carrier period of PERIOD clocks,
// restarted by sync at the start of each sampling period. Leg A is high
// while the count is below D_TIME, leg B is its complement, so the bridge
// output averages VDC * (2*D_TIME/PERIOD - 1). Each switch turns on only
// after its leg command has been stable for DEAD clocks (dead time); turn-off
// is immediate, so the high and low switch of a leg are never on together.
// A new d_time (d_valid) is held in a shadow register and takes effect at the
// next carrier start. The carrier rate equal to the 20 kHz sampling rate,
// the dead time and the bipolar scheme are this design's choices; the
// published design names the block and shows four gate lines.
//
// gate = {B low, B high, A low, A high}.
module gate_drive
  import ups_pkg::*;
#(
  parameter int PERIOD = CLK_HZ_DEFAULT / FS_HZ_DEFAULT,
  parameter int DEAD   = 62
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sync,
  input  logic        d_valid,
  input  logic [11:0] d_time,
  output logic [3:0]  gate
);
  localparam int CW = $clog2(PERIOD + 1);
  localparam int DW = $clog2(DEAD + 1);

  logic [CW-1:0] cnt;
  logic [11:0]   d_next, d_cur;
  logic          leg_a, leg_a_q;
  logic [DW-1:0] stable;          // clocks since leg_a last changed, saturating

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      d_next <= 12'(PERIOD / 2);
      d_cur  <= 12'(PERIOD / 2);
    end else begin
      if (d_valid) d_next <= d_time;
      if (sync || cnt == CW'(PERIOD - 1)) begin
        cnt   <= '0;
        d_cur <= d_valid ? d_time : d_next;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign leg_a = (32'(cnt) < 32'(d_cur));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      leg_a_q <= 1'b0;
      stable  <= '0;
      gate    <= '0;
    end else begin
      leg_a_q <= leg_a;
      if (leg_a != leg_a_q)       stable <= '0;
      else if (stable != DW'(DEAD)) stable <= stable + 1'b1;
      if (leg_a != leg_a_q) begin
        gate <= '0;
      end else begin
        gate[0] <=  leg_a && (stable == DW'(DEAD));   // A high
        gate[1] <= !leg_a && (stable == DW'(DEAD));   // A low
        gate[2] <= !leg_a && (stable == DW'(DEAD));   // B high
        gate[3] <=  leg_a && (stable == DW'(DEAD));   // B low
      end
    end
  end

endmodule
