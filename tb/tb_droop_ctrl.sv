// tb_droop_ctrl: self-checking test of the droop characteristics.
// Random powers, rated powers and signed gains are applied; the references
// must follow phi* = phi0 - m (P0 - P) and E* = E0 - n (Q0 - Q), computed in
// real arithmetic, with the phase change limited to +-90 degrees and E* to
// 0..131071. A falling phase-power line (m < 0) is checked for monotonicity.
module tb_droop_ctrl;
  import ups_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   in_valid = 1'b0, out_valid;
  power_t p = '0, q = '0, p0 = '0, q0 = '0;
  logic signed [31:0] m_gain = '0, n_gain = '0;
  angle_t phi0 = '0, phi_ref;
  data_t  e0 = '0, e_ref;
  int checks = 0, failures = 0;

  droop_ctrl dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic apply();
    @(negedge clk);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    real dphi, de, ee;
    int ephi, gotd, prev;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      p  = power_t'(int'($urandom_range(0, 200000)) - 100000);
      q  = power_t'(int'($urandom_range(0, 200000)) - 100000);
      p0 = power_t'(int'($urandom_range(0, 100000)));
      q0 = power_t'(int'($urandom_range(0, 2000)) - 1000);
      m_gain = 32'(int'($urandom_range(0, 40000)) - 20000);
      n_gain = 32'(int'($urandom_range(0, 40000)) - 20000);
      phi0 = angle_t'($urandom_range(0, 65535));
      e0   = data_t'($urandom_range(10000, 60000));
      dphi = $floor(real'(int'(p0) - int'(p)) * real'(int'(m_gain)) / 65536.0);
      if (dphi > 16384.0) dphi = 16384.0;
      if (dphi < -16384.0) dphi = -16384.0;
      de = $floor(real'(int'(q0) - int'(q)) * real'(int'(n_gain)) / 65536.0);
      ee = real'(int'(e0)) - de;
      if (ee > 131071.0) ee = 131071.0;
      if (ee < 0.0) ee = 0.0;
      ephi = (int'(phi0) - int'(dphi)) & 65535;
      apply();
      check(out_valid, "valid");
      check(int'(phi_ref) == ephi, $sformatf("phi %0d exp %0d", phi_ref, ephi));
      check(real'(int'(e_ref)) == ee, $sformatf("E %0d exp %f", e_ref, ee));
    end
    // falling characteristic: phase must not rise as P grows (m < 0)
    p0 = 50000; m_gain = -32'sd3000; phi0 = 16'd1000; q = 0; q0 = 0; n_gain = 0; e0 = 20000;
    prev = 1 << 30;
    for (int k = 0; k <= 20; k++) begin
      p = power_t'(k * 5000);
      apply();
      gotd = int'($signed(phi_ref));
      check(gotd <= prev, $sformatf("droop slope at P=%0d", p));
      if (k == 10) check(phi_ref == 16'd1000, "phi* = phi0 at P = P0");
      prev = gotd;
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
