// tb_timing_ctrl: self-checking test of the timing controller.
// With a 2 MHz clock and 20 kHz sampling (100-clock periods), tick must
// repeat every 100 clocks; for a hw_done given a random number of clocks
// after tick, hw_cycles must report that number and irq must pulse once.
// Withholding hw_done for one period must set overrun.
module tb_timing_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        hw_done = 1'b0, tick, irq, overrun;
  logic [11:0] hw_cycles;
  int checks = 0, failures = 0;

  timing_ctrl #(.CLK_HZ(2_000_000), .FS_HZ(20_000)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int gap, lat, irqs;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!tick) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      lat  = (n == 150) ? 1000 : int'($urandom_range(2, 90));
      gap  = 0;
      irqs = 0;
      do begin
        @(negedge clk);
        gap++;
        hw_done = (gap == lat);
        if (irq) irqs++;
      end while (!tick);
      hw_done = 1'b0;
      check(gap == 100, $sformatf("period %0d", gap));
      if (n != 150) begin
        check(hw_cycles == 12'(lat), $sformatf("hw_cycles %0d exp %0d", hw_cycles, lat));
        check(irqs == 1, "irq count");
        check(overrun == (n > 150), "overrun flag");
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
