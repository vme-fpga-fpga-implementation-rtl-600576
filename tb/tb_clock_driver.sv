// tb_clock_driver: self-checking testbench of the 32 MHz to 16 MHz divider.
//
// Checks that sysclk toggles on every 32 MHz edge after reset (period two
// input clocks, 62.5 ns, i.e. 16 MHz) and that ce16 is high in exactly one of
// every two cycles, in the cycle where sysclk is low.
module tb_clock_driver;
  timeunit 1ns; timeprecision 1ps;

  logic clk32 = 1'b0;
  logic sysreset_n;
  logic sysclk, ce16;

  int checks = 0, failures = 0;

  clock_driver dut (.*);

  always #15.625 clk32 = ~clk32;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (sysclk=%b ce16=%b)", what, sysclk, ce16);
    end
  endtask

  initial begin
    logic    prev;
    int      ce_count;
    realtime t_rise, t_prev_rise;
    sysreset_n = 1'b0;
    repeat (3) @(posedge clk32);
    #1 check(!sysclk && ce16, "reset state");
    @(negedge clk32) sysreset_n = 1'b1;
    ce_count = 0; t_prev_rise = 0.0;
    @(posedge clk32); #1;
    for (int i = 0; i < 64; i++) begin
      prev = sysclk;
      if (ce16) ce_count++;
      check(ce16 == !sysclk, "ce16 is high while sysclk is low");
      @(posedge clk32); #1;
      check(sysclk == !prev, "sysclk toggles every input clock");
      if (sysclk) begin
        t_rise = $realtime;
        if (t_prev_rise > 0.0)
          check(t_rise - t_prev_rise > 62.49 && t_rise - t_prev_rise < 62.51, "sysclk period 62.5 ns");
        t_prev_rise = t_rise;
      end
    end
    check(ce_count == 32, $sformatf("ce16 high in %0d of 64 cycles", ce_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk32);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
