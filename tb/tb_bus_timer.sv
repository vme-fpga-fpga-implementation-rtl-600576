// tb_bus_timer: self-checking testbench of the 56 us bus timer.
//
// The 32 MHz clock (31.25 ns period) and the 16 MHz enable are generated
// here. Checks: BERR stays negated while no strobe is asserted; with DS0*
// asserted BERR falls after 896 ticks of 16 MHz, i.e. 1792 clocks or 56 us
// (1791 when the strobe arrives in the enable cycle itself); it stays asserted until the strobes are negated and is
// released on the next edge; DS1* alone starts the timer too; a strobe
// shorter than the timeout gives no BERR and restarts the count from zero;
// the divider counter reads 0x80 after 128 ticks.
module tb_bus_timer;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       sysreset_n;
  logic       ce16;
  logic       ds0_n, ds1_n;
  logic       berr_n;
  logic [7:0] count;

  int checks = 0, failures = 0;

  bus_timer dut (.*);

  always #15.625 clk = ~clk;

  // 16 MHz enable: every second 32 MHz cycle.
  always_ff @(posedge clk)
    if (!sysreset_n) ce16 <= 1'b1;
    else             ce16 <= ~ce16;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (berr_n=%b count=%h)", what, berr_n, count);
    end
  endtask

  // Cycles from now until BERR falls, or limit.
  task automatic cycles_to_berr(input int limit, output int n);
    n = 0;
    while (berr_n && n < limit) begin
      @(posedge clk); #1;
      n++;
    end
  endtask

  initial begin
    int  n;
    realtime t0;
    sysreset_n = 1'b0; ds0_n = 1'b1; ds1_n = 1'b1;
    repeat (3) @(negedge clk);
    sysreset_n = 1'b1;
    repeat (3000) @(negedge clk);
    check(berr_n && count == 8'h00, "idle without strobes");

    // DS0 timeout
    @(posedge clk); #1;     // align to just after an edge
    ds0_n = 1'b0; t0 = $realtime;
    repeat (256) @(posedge clk); #1;
    check(count == 8'h80, "counter at 0x80 after 128 ticks");
    cycles_to_berr(5000, n);
    n += 256;
    check(n inside {1791, 1792}, $sformatf("BERR after %0d clocks, expected 1792 (1791 by enable phase)", n));
    check($realtime - t0 > 55968.0 && $realtime - t0 < 56001.0,
          $sformatf("BERR after %0.1f ns, expected 56000", $realtime - t0));
    repeat (500) @(posedge clk); #1;
    check(!berr_n, "BERR held while DS0 asserted");
    ds0_n = 1'b1;
    #1 check(!berr_n, "BERR still driven in the cycle DS0 rises");
    @(posedge clk); #1;
    check(berr_n && count == 8'h00, "BERR released one edge after DS0 negated");

    // DS1 alone
    repeat (10) @(posedge clk); #1;
    ds1_n = 1'b0;
    cycles_to_berr(5000, n);
    check(n inside {1791, 1792}, $sformatf("DS1 timeout after %0d clocks", n));
    ds1_n = 1'b1;
    @(posedge clk); #1;

    // short strobe: no BERR, count restarts
    repeat (10) @(posedge clk); #1;
    ds0_n = 1'b0;
    repeat (1700) @(posedge clk); #1;
    check(berr_n, "no BERR before timeout");
    ds0_n = 1'b1;
    @(posedge clk); #1;
    check(berr_n && count == 8'h00, "counter cleared by negated strobe");
    ds0_n = 1'b0;
    cycles_to_berr(5000, n);
    check(n inside {1791, 1792}, $sformatf("restarted timeout after %0d clocks", n));
    ds0_n = 1'b1;
    @(posedge clk); #1;
    check(berr_n, "released at end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
