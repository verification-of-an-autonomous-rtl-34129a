// tb_pll_pi: self-checking test of the PLL's PI controller.
// A sequence of Vd inputs is applied; a real-valued model of
// f = 50 Hz + KP*e + KI*sum(e), e = -Vd, with the 40..60 Hz clamp and
// integrator limit, gives the expected frequency after every update.
module tb_pll_pi;
  import ups_pkg::*;
  localparam int KP = 115, KI = 33000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid = 1'b0, out_valid;
  data_t vd = '0;
  freq_t freq;
  int checks = 0, failures = 0;

  pll_pi #(.KP(KP), .KI(KI)) dut (.*);

  initial begin
    real integ, f, e, ilim_hi, ilim_lo;
    int v;
    integ = 0.0;
    ilim_hi = 10.0 * 65536.0 * 65536.0;
    ilim_lo = -10.0 * 65536.0 * 65536.0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (freq != 32'(50 << 16)) failures++;
    for (int n = 0; n < 3000; n++) begin
      if (n < 1000)       v = int'($urandom_range(0, 4000)) - 2000;
      else if (n < 2000)  v = -3000;            // drives f up to the clamp
      else                v = 2500;             // and back down to the lower clamp
      vd = data_t'(v);
      e = -real'(v);
      integ = integ + e * real'(KI);
      if (integ > ilim_hi) integ = ilim_hi;
      if (integ < ilim_lo) integ = ilim_lo;
      f = 50.0 * 65536.0 + e * real'(KP) + $floor(integ / 65536.0);
      if (f > 60.0 * 65536.0) f = 60.0 * 65536.0;
      if (f < 40.0 * 65536.0) f = 40.0 * 65536.0;
      @(negedge clk);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || (real'(freq) - f) > 1.5 || (real'(freq) - f) < -1.5) begin
        failures++;
        $display("FAIL n=%0d freq %0d exp %f", n, freq, f);
      end
      repeat (2) @(negedge clk);
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
