// tb_gate_drive: self-checking test of PWM generation with dead time.
// Runs with a 200-clock carrier and 10-clock dead time. Every carrier period
// a new on-time is loaded mid-period; the next period's A-high pulse must be
// that on-time less the dead time (+-2 clocks). Both switches of a leg must
// never be on together, each turn-on must follow at least DEAD clocks with
// both switches off, and leg B must be the complement of leg A.
module tb_gate_drive;
  localparam int PERIOD = 200, DEAD = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        sync = 1'b0, d_valid = 1'b0;
  logic [11:0] d_time = '0;
  logic [3:0]  gate;
  int checks = 0, failures = 0;

  gate_drive #(.PERIOD(PERIOD), .DEAD(DEAD)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // continuous safety monitor
  int off_a = 0, off_b = 0, edges = 0;
  logic [3:0] gate_q = '0;
  always @(posedge clk) if (rst_n) begin
    check(!(gate[0] && gate[1]) && !(gate[2] && gate[3]), "shoot-through");
    check(gate[3] == gate[0] && gate[2] == gate[1], "leg B not complementary");
    if ((gate[0] && !gate_q[0]) || (gate[1] && !gate_q[1])) begin
      edges++;
      check(off_a >= DEAD, $sformatf("dead time %0d", off_a));
    end
    off_a = (gate[0] || gate[1]) ? 0 : off_a + 1;
    gate_q = gate;
  end

  initial begin
    int d_cur, d_new, high;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    d_cur = PERIOD / 2;
    for (int n = 0; n < 300; n++) begin
      d_new = int'($urandom_range(20, PERIOD - 20));
      sync = 1'b1;
      @(negedge clk);
      sync = 1'b0;
      high = 0;
      for (int c = 1; c < PERIOD; c++) begin
        if (c == PERIOD / 2) begin
          d_time = 12'(d_new);
          d_valid = 1'b1;
        end else begin
          d_valid = 1'b0;
        end
        if (gate[0]) high++;
        @(negedge clk);
      end
      if (gate[0]) high++;
      if (n > 1)
        check(high >= d_cur - DEAD - 2 && high <= d_cur - DEAD + 2,
              $sformatf("period %0d: A high %0d for on-time %0d", n, high, d_cur));
      d_cur = d_new;
    end
    check(edges > 500, "too few switching edges");
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
