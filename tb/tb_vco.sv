// tb_vco: self-checking test of the VCO and its sample-and-hold phases.
// For several frequencies the accumulated phase after each tick is compared
// with f * n / 20 kHz turns (+-2 counts of 2^16), and theta_hold[j] must be
// the phase of j ticks before.
module tb_vco;
  import ups_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   tick = 1'b0;
  freq_t  freq = 32'(50 << 16);
  angle_t theta;
  angle_t theta_hold [NUM_RATES];
  int checks = 0, failures = 0;

  vco #(.FS_HZ(20000)) dut (.*);

  initial begin
    real turns, fr;
    int exp_t, diff;
    angle_t past [$];
    turns = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    past.push_front(theta);
    for (int n = 0; n < 3000; n++) begin
      if (n % 500 == 0) begin
        fr = 45.0 + 2.5 * real'(n / 500);
        freq = freq_t'(longint'(fr * 65536.0));
      end
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
      turns = turns + real'(freq) / 65536.0 / 20000.0;
      turns = turns - $floor(turns);
      exp_t = int'(longint'(turns * 65536.0)) & 65535;
      diff = int'($signed(16'(int'(theta) - exp_t)));
      checks++;
      if (diff > 2 || diff < -2) begin
        failures++;
        $display("FAIL n=%0d theta %0d exp %0d", n, theta, exp_t);
      end
      for (int j = 0; j < NUM_RATES; j++) begin
        if (past.size() > j) begin
          checks++;
          if (theta_hold[j] != past[j]) begin
            failures++;
            $display("FAIL n=%0d hold[%0d] %0d exp %0d", n, j, theta_hold[j], past[j]);
          end
        end
      end
      past.push_front(theta);
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
