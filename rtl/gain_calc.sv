// gain_calc: quasi dq gains KH_J = 1 / (2 * omega * J * Ts) for the three
// branches, from the frequency detected by the PLL.
//
// With omega = 2*pi*f and Ts = 1/FS_HZ, KH1 = FS_HZ / (4*pi*f). KH1 is found by
// one 48-by-32-bit restoring division of the constant FS_HZ*2^32/(4*pi) by the
// Q16.16 frequency, one quotient bit per clock; KH2 = KH1/2 is a shift and
// KH3 = KH1/3 a multiply by 43691/2^17. The formula is the published design's (its
// equation for V_beta); the divider and the shared division are this design's
// choice. After reset the gains hold their 50 Hz values.
//
// Interface: freq is captured when start is high (ignored while busy); done
// pulses 50 clocks later and kh[] (Q16.16) changes in the same clock.
module gain_calc
  import ups_pkg::*;
#(
  parameter int unsigned FS_HZ = FS_HZ_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  freq_t freq,
  output logic  done,
  output gain_t kh [NUM_RATES]
);
  localparam real    PI_R = 3.14159265358979323846;
  localparam longint NUM  = longint'(real'(FS_HZ) / (4.0 * PI_R) * 4294967296.0);
  localparam longint KH50 = NUM / (longint'(F_NOM_HZ) <<< 16);
  localparam logic [17:0] INV3 = 18'd43691;

  logic [47:0] dividend;
  logic [32:0] rem;
  logic [47:0] quo;
  logic [31:0] divisor;
  logic [5:0]  bitn;
  logic        busy, fin;

  logic [32:0] rem_sh;
  logic [49:0] kh3_w;
  always_comb begin
    rem_sh = {rem[31:0], dividend[47]};
    kh3_w  = 50'(quo[31:0]) * 50'(INV3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dividend <= '0; rem <= '0; quo <= '0; divisor <= 32'd1; bitn <= '0;
      busy <= 1'b0; fin <= 1'b0; done <= 1'b0;
      kh[0] <= gain_t'(KH50);
      kh[1] <= gain_t'(KH50 / 2);
      kh[2] <= gain_t'(KH50 / 3);
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start && !busy) begin
        dividend <= 48'(NUM);
        divisor  <= (freq == '0) ? 32'd1 : freq;
        rem      <= '0;
        quo      <= '0;
        bitn     <= '0;
        busy     <= 1'b1;
      end else if (busy) begin
        dividend <= dividend << 1;
        if (rem_sh >= {1'b0, divisor}) begin
          rem <= rem_sh - {1'b0, divisor};
          quo <= {quo[46:0], 1'b1};
        end else begin
          rem <= rem_sh;
          quo <= {quo[46:0], 1'b0};
        end
        bitn <= bitn + 1'b1;
        if (bitn == 6'd47) begin
          busy <= 1'b0;
          fin  <= 1'b1;
        end
      end
      if (fin) begin
        // a quotient above 32 bits cannot occur for freq >= 1 Hz
        kh[0] <= quo[31:0];
        kh[1] <= {1'b0, quo[31:1]};
        kh[2] <= kh3_w[48:17];
        done  <= 1'b1;
      end
    end
  end

endmodule
