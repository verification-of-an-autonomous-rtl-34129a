// tb_vref_calc: self-checking test of the voltage reference calculation.
// For random theta, phi* and E*, vref must equal E* cos(theta + phi*)
// within 0.05 % of E* plus 4 counts, 19 clocks after start.
module tb_vref_calc;
  import ups_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   start = 1'b0, done;
  angle_t theta = '0, phi_ref = '0;
  data_t  e_ref = '0, vref;
  int checks = 0, failures = 0;

  vref_calc dut (.*);

  initial begin
    real ev, ang;
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      theta   = angle_t'($urandom_range(0, 65535));
      phi_ref = angle_t'($urandom_range(0, 65535));
      e_ref   = data_t'($urandom_range(0, 50000));
      ang = (real'(theta) + real'(phi_ref)) * 2.0 * PI / 65536.0;
      ev  = real'(e_ref) * $cos(ang);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != 19 || (real'(vref) - ev) > 5e-4 * real'(e_ref) + 4.0 ||
          (ev - real'(vref)) > 5e-4 * real'(e_ref) + 4.0) begin
        failures++;
        $display("FAIL lat %0d vref %0d exp %f", lat, vref, ev);
      end
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
