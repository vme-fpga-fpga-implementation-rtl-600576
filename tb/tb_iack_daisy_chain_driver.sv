// tb_iack_daisy_chain_driver: self-checking testbench of the IACK* driver.
//
// Checks that IACKOUT* stays high for ordinary cycles (AS and DS0 without
// IACK) and for IACK with AS but no DS0; that it falls one clock after IACK*
// and DS0* are both low; that it stays low while DS0* toggles as long as AS*
// is held; and that it rises one clock after AS* is negated.
module tb_iack_daisy_chain_driver;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic sysreset_n, iack_n, as_n, ds0_n, iackout_n;

  int checks = 0, failures = 0;

  iack_daisy_chain_driver dut (.*);

  always #15.625 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (iackout_n=%b)", what, iackout_n);
    end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    sysreset_n = 1'b0; iack_n = 1'b1; as_n = 1'b1; ds0_n = 1'b1;
    tick(3); sysreset_n = 1'b1; tick(1);
    check(iackout_n, "idle after reset");

    // ordinary data cycle
    as_n = 1'b0; tick(1); ds0_n = 1'b0; tick(4);
    check(iackout_n, "no IACKOUT in a data cycle");
    ds0_n = 1'b1; as_n = 1'b1; tick(2);

    // IACK cycle
    iack_n = 1'b0; as_n = 1'b0; tick(3);
    check(iackout_n, "no IACKOUT before DS0");
    ds0_n = 1'b0; #1;
    check(iackout_n, "IACKOUT not yet in the DS0 cycle");
    tick(1);
    check(!iackout_n, "IACKOUT one clock after IACK and DS0");
    ds0_n = 1'b1; tick(3);
    check(!iackout_n, "IACKOUT held while AS asserted");
    as_n = 1'b1; iack_n = 1'b1; #1;
    check(!iackout_n, "IACKOUT still low in the AS-negation cycle");
    tick(1);
    check(iackout_n, "IACKOUT released one clock after AS negated");
    tick(2);
    check(iackout_n, "stays released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
