// tb_sdram_pll: runs the PLL model from a 50 MHz clock and checks, once the
// output is running, that every rising edge of c0 comes 3 ns before a rising
// edge of the input clock, that c0 keeps the 20 ns period and a 50% duty
// cycle.
module tb_sdram_pll;
  logic clk = 0, c0;
  int checks = 0, failures = 0;
  realtime t_c0_rise, t_c0_fall;

  sdram_pll dut (.inclk0(clk), .c0);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime prev;
    int n;
    #100;
    @(posedge c0);
    prev = $realtime;
    n = 0;
    repeat (200) begin
      @(negedge c0) t_c0_fall = $realtime;
      check(t_c0_fall - prev > 9.999 && t_c0_fall - prev < 10.001, "duty cycle");
      @(posedge c0) t_c0_rise = $realtime;
      check(t_c0_rise - prev > 19.999 && t_c0_rise - prev < 20.001, "period");
      prev = t_c0_rise;
      @(posedge clk);
      check($realtime - t_c0_rise > 2.999 && $realtime - t_c0_rise < 3.001, "leads clock by 3 ns");
      n++;
    end
    check(n == 200, "edges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
