// tb_dq_average: self-checking test of the three-unit averaging.
// Random d, q and amplitude values are compared with their exact mean
// (+-2 counts); phases are drawn around a random centre, including centres
// near +-180 degrees, and must average to the circular mean.
module tb_dq_average;
  import ups_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, out_valid;
  dq_t  dq_in [NUM_RATES];
  dq_t  dq_out;
  int checks = 0, failures = 0;

  dq_average dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int d[3], q[3], a[3], off[3], centre, ed, eq, ea, ep, gp;
    for (int j = 0; j < 3; j++) dq_in[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      centre = (n % 4 == 0) ? 32768 : int'($urandom_range(0, 65535));
      for (int j = 0; j < 3; j++) begin
        d[j]   = int'($urandom_range(0, 200000)) - 100000;
        q[j]   = int'($urandom_range(0, 200000)) - 100000;
        a[j]   = int'($urandom_range(0, 100000));
        off[j] = int'($urandom_range(0, 2000)) - 1000;
        dq_in[j].d     = data_t'(d[j]);
        dq_in[j].q     = data_t'(q[j]);
        dq_in[j].amp   = data_t'(a[j]);
        dq_in[j].phase = angle_t'(centre + off[j]);
      end
      ed = (d[0] + d[1] + d[2]);
      eq = (q[0] + q[1] + q[2]);
      ea = (a[0] + a[1] + a[2]);
      ep = centre + (off[0] + off[1] + off[2]) / 3;
      @(negedge clk);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "valid");
      check(3 * int'(dq_out.d) - ed <= 5 && 3 * int'(dq_out.d) - ed >= -5, $sformatf("d %0d exp %0d/3", dq_out.d, ed));
      check(3 * int'(dq_out.q) - eq <= 5 && 3 * int'(dq_out.q) - eq >= -5, $sformatf("q %0d exp %0d/3", dq_out.q, eq));
      check(3 * int'(dq_out.amp) - ea <= 5 && 3 * int'(dq_out.amp) - ea >= -5, $sformatf("amp %0d exp %0d/3", dq_out.amp, ea));
      gp = int'($signed(16'(int'(dq_out.phase) - ep)));
      check(gp <= 1 && gp >= -1, $sformatf("phase %0d exp %0d", dq_out.phase, ep & 65535));
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
