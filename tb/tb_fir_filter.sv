// tb_fir_filter: self-checking test of the moving-average FIR filter.
// Random samples with random gaps are compared with a software model that
// keeps the last four samples; output must follow one clock after in_valid.
module tb_fir_filter;
  import ups_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, out_valid;
  sample_t din = '0, dout;
  int checks = 0, failures = 0;
  int hist [4] = '{0, 0, 0, 0};

  fir_filter #(.TAPS(4)) dut (.*);

  initial begin
    int s, exp_v;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      s = int'($urandom_range(0, 65535)) - 32768;
      if (n % 7 == 3) s = 32767;
      din = sample_t'(s);
      in_valid = 1'b1;
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = s;
      exp_v = (hist[0] + hist[1] + hist[2] + hist[3]) >>> 2;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || int'(dout) != exp_v) begin
        failures++;
        $display("FAIL n=%0d got %0d exp %0d valid %b", n, dout, exp_v, out_valid);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
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
