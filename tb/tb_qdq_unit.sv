// tb_qdq_unit: self-checking test of the quasi dq transformation.
// A 16000-count sine of 47..53 Hz sampled at 20 kHz is fed to units with
// J = 1 and J = 3. theta is the sine's own phase at sample k-J minus a random
// offset, and KH is set for the true frequency, so the expected results are
// known independently: amplitude 16000 and phase = offset, d and q the
// matching cosine and sine. The latency must be 40 clocks.
module tb_qdq_unit;
  import ups_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 20000.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    in_valid = 1'b0;
  sample_t din = '0;
  angle_t  theta1 = '0, theta3 = '0;
  gain_t   kh1 = '0, kh3 = '0;
  logic    ov1, ov3;
  dq_t     dq1, dq3;
  int checks = 0, failures = 0;

  qdq_unit #(.J(1)) dut1 (.clk, .rst_n, .in_valid, .din, .theta(theta1), .kh(kh1), .out_valid(ov1), .dq(dq1));
  qdq_unit #(.J(3)) dut3 (.clk, .rst_n, .in_valid, .din, .theta(theta3), .kh(kh3), .out_valid(ov3), .dq(dq3));

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction
  function automatic real wrap_deg(input real a);
    while (a > 180.0) a -= 360.0;
    while (a < -180.0) a += 360.0;
    return a;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic check_dq(input dq_t r, input real off_deg, input real amp, input string tag);
    real eph;
    eph = real'(r.phase) * 360.0 / 65536.0;
    check(fabs(real'(r.amp) - amp) < 0.004 * amp + 8.0, $sformatf("%s amp %0d exp %f", tag, r.amp, amp));
    check(fabs(wrap_deg(eph - off_deg)) < 0.3, $sformatf("%s phase %f exp %f", tag, eph, off_deg));
    check(fabs(real'(r.d) - amp * $cos(off_deg * PI / 180.0)) < 0.006 * amp + 8.0,
          $sformatf("%s d %0d", tag, r.d));
    check(fabs(real'(r.q) - amp * $sin(off_deg * PI / 180.0)) < 0.006 * amp + 8.0,
          $sformatf("%s q %0d", tag, r.q));
  endtask

  initial begin
    real f, amp, ph0, off1, off3, w;
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 6; trial++) begin
      f    = 47.0 + 1.2 * real'(trial);
      amp  = 16000.0;
      ph0  = real'($urandom_range(0, 359));
      w    = 2.0 * PI * f / FS;
      kh1  = gain_t'(longint'(65536.0 / (2.0 * w)));
      kh3  = gain_t'(longint'(65536.0 / (6.0 * w)));
      off1 = real'($urandom_range(0, 359)) - 180.0;
      off3 = real'($urandom_range(0, 359)) - 180.0;
      for (int k = 0; k < 40; k++) begin
        @(negedge clk);
        din = sample_t'($rtoi(amp * $cos(w * real'(k) + ph0 * PI / 180.0)));
        // phase of the sample J periods ago, less the expected offset
        theta1 = angle_t'(longint'(((w * real'(k - 1) + ph0 * PI / 180.0) * 180.0 / PI - off1) * 65536.0 / 360.0));
        theta3 = angle_t'(longint'(((w * real'(k - 3) + ph0 * PI / 180.0) * 180.0 / PI - off3) * 65536.0 / 360.0));
        in_valid = 1'b1;
        @(negedge clk);
        in_valid = 1'b0;
        lat = 1;
        while (!ov1) begin
          @(negedge clk);
          lat++;
        end
        if (k >= 7) begin
          check(lat == 40 && ov3, $sformatf("latency %0d", lat));
          check_dq(dq1, off1, amp, $sformatf("J1 f=%f k=%0d", f, k));
          check_dq(dq3, off3, amp, $sformatf("J3 f=%f k=%0d", f, k));
        end
        repeat (5) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
