// tb_power_calc: self-checking test of the power calculation.
// Voltage and current phasors of random amplitude and phase, at a random
// dq-frame angle, must give P = V I cos(phi) / 2 and Q = V I sin(phi) / 2
// (lagging current positive), scaled by 2^-16, within 2 counts.
module tb_power_calc;
  import ups_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   in_valid = 1'b0, out_valid;
  dq_t    v = '0, i = '0;
  power_t p, q;
  int checks = 0, failures = 0;

  power_calc dut (.*);

  initial begin
    real va, ia, frame, lag, ep, eq;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      va    = real'($urandom_range(0, 32000));
      ia    = real'($urandom_range(0, 32000));
      frame = real'($urandom_range(0, 6283)) / 1000.0;
      lag   = real'($urandom_range(0, 6283)) / 1000.0 - PI;
      v.d   = data_t'($rtoi(va * $cos(frame)));
      v.q   = data_t'($rtoi(va * $sin(frame)));
      i.d   = data_t'($rtoi(ia * $cos(frame - lag)));
      i.q   = data_t'($rtoi(ia * $sin(frame - lag)));
      ep = va * ia * $cos(lag) / 2.0 / 65536.0;
      eq = va * ia * $sin(lag) / 2.0 / 65536.0;
      @(negedge clk);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || (real'(p) - ep) > 2.0 || (ep - real'(p)) > 2.0 ||
          (real'(q) - eq) > 2.0 || (eq - real'(q)) > 2.0) begin
        failures++;
        $display("FAIL p %0d exp %f q %0d exp %f", p, ep, q, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
