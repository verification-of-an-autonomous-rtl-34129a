// tb_cordic: self-checking test of the iterative CORDIC.
// Random vectors in both modes are compared with real-valued sin, cos,
// sqrt and atan2; the latency from start to done must be ITER+2 clocks.
module tb_cordic;
  localparam int W = 20;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, vectoring = 1'b0, done;
  logic signed [W-1:0] x_in = '0, y_in = '0, x_out, y_out;
  logic [15:0] z_in = '0, z_out;
  int checks = 0, failures = 0;

  cordic #(.W(W), .ITER(16)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic real wrap_deg(input real a);
    while (a > 180.0) a -= 360.0;
    while (a < -180.0) a += 360.0;
    return a;
  endfunction

  task automatic run(input bit vec, input int x, input int y, input int z);
    int lat;
    @(negedge clk);
    vectoring = vec; x_in = W'(x); y_in = W'(y); z_in = 16'(z); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 18, $sformatf("latency %0d", lat));
  endtask

  initial begin
    real ang, ex, ey, mag, e_ang;
    int x, y, z;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      x = int'($urandom_range(0, 200000)) - 100000;
      y = int'($urandom_range(0, 200000)) - 100000;
      z = int'($urandom_range(0, 65535));
      // rotation
      run(1'b0, x, y, z);
      ang = real'(z) * 2.0 * PI / 65536.0;
      ex = real'(x) * $cos(ang) - real'(y) * $sin(ang);
      ey = real'(x) * $sin(ang) + real'(y) * $cos(ang);
      // 16-bit angles limit the accuracy to about 2e-4 of the magnitude
      mag = $sqrt(real'(x) * real'(x) + real'(y) * real'(y));
      check(fabs(real'(x_out) - ex) < 8.0 + 3e-4 * mag && fabs(real'(y_out) - ey) < 8.0 + 3e-4 * mag,
            $sformatf("rot x=%0d y=%0d z=%0d got %0d %0d exp %f %f", x, y, z, x_out, y_out, ex, ey));
      // vectoring
      run(1'b1, x, y, 0);
      mag = $sqrt(real'(x) * real'(x) + real'(y) * real'(y));
      e_ang = $atan2(real'(y), real'(x)) * 180.0 / PI;
      check(fabs(real'(x_out) - mag) < 12.0,
            $sformatf("vec mag x=%0d y=%0d got %0d exp %f", x, y, x_out, mag));
      if (mag > 1000.0)
        check(fabs(wrap_deg(real'(z_out) * 360.0 / 65536.0 - e_ang)) < 0.02 + 60.0 / mag,
              $sformatf("vec ang x=%0d y=%0d got %0d exp %f", x, y, z_out, e_ang));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
