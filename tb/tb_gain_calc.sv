// tb_gain_calc: self-checking test of the quasi dq gain calculation.
// For frequencies between 40 and 60 Hz, KH_J must equal
// 1 / (2 * 2*pi*f * J / 20 kHz) within 2e-5 relative, done must come 50
// clocks after start, and the reset values must be the 50 Hz gains.
module tb_gain_calc;
  import ups_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  start = 1'b0, done;
  freq_t freq = '0;
  gain_t kh [NUM_RATES];
  int checks = 0, failures = 0;

  gain_calc #(.FS_HZ(20000)) dut (.*);

  task automatic check_kh(input real f);
    real e;
    for (int j = 0; j < NUM_RATES; j++) begin
      e = 65536.0 / (2.0 * 2.0 * PI * f * real'(j + 1) / 20000.0);
      checks++;
      if ((real'(kh[j]) - e) > 2e-5 * e + 1.0 || (e - real'(kh[j])) > 2e-5 * e + 1.0) begin
        failures++;
        $display("FAIL f=%f kh[%0d] %0d exp %f", f, j, kh[j], e);
      end
    end
  endtask

  initial begin
    real f;
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check_kh(50.0);
    for (int n = 0; n < 200; n++) begin
      f = 40.0 + 20.0 * real'($urandom_range(0, 10000)) / 10000.0;
      freq = freq_t'(longint'(f * 65536.0));
      f = real'(freq) / 65536.0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != 50) begin
        failures++;
        $display("FAIL latency %0d", lat);
      end
      check_kh(f);
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
