// tb_deadbeat_calc: self-checking test of the on-time calculation.
// With KV = 128 and KI = 64, random references and measurements must give
// D_TIME = PERIOD/2 (1 + u/VDC), u = vref + 0.5 (vref - v) + 0.25 i,
// clamped to 0..PERIOD, within 2 clocks, two clocks after start.
module tb_deadbeat_calc;
  import ups_pkg::*;
  localparam int PERIOD = 3100, VDC = 32000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    start = 1'b0, done;
  data_t   vref = '0;
  sample_t v = '0, i = '0;
  logic [11:0] d_time;
  int checks = 0, failures = 0;

  deadbeat_calc #(.PERIOD(PERIOD), .VDC(VDC), .KV(128), .KI(64)) dut (.*);

  initial begin
    real u, ed;
    int sat = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      vref = data_t'(int'($urandom_range(0, 60000)) - 30000);
      v    = sample_t'(int'(vref) + int'($urandom_range(0, 8000)) - 4000);
      i    = sample_t'(int'($urandom_range(0, 40000)) - 20000);
      u  = real'(vref) + 0.5 * (real'(vref) - real'(v)) + 0.25 * real'(i);
      ed = real'(PERIOD) / 2.0 * (1.0 + u / real'(VDC));
      if (ed < 0.0) ed = 0.0;
      if (ed > real'(PERIOD)) ed = real'(PERIOD);
      if (ed == 0.0 || ed == real'(PERIOD)) sat++;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      @(negedge clk);
      checks++;
      if (!done || (real'(d_time) - ed) > 2.0 || (ed - real'(d_time)) > 2.0) begin
        failures++;
        $display("FAIL d_time %0d exp %f done %b", d_time, ed, done);
      end
    end
    checks++;
    if (sat == 0) begin
      failures++;
      $display("FAIL clamp never exercised");
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
