// tb_interrupter: self-checking testbench of one interrupter.
//
// The interrupter is set to level 3 with STATUS/ID 0x5A. Checks: IRQ3* follows
// a local request; an acknowledge cycle for another level is passed on to
// IACKOUT* (one clock after IACKIN*) and released with AS*; an acknowledge for
// level 3 is claimed (IACKOUT* stays high), answered one clock after DS0* with
// DTACK* and 0x5A on D0-D7, and the request is released; DTACK* is removed one
// clock after DS0* rises; a later level-3 acknowledge with nothing pending is
// passed on.
module tb_interrupter;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       sysreset_n, int_req, irq_n, iackin_n, iackout_n, as_n, ds0_n;
  logic [2:0] addr;
  logic [7:0] d_out;
  logic       d_oe, dtack_n, pending;

  int checks = 0, failures = 0;

  interrupter #(.LEVEL(3'd3), .STATUS_ID(8'h5A)) dut (.*);

  always #15.625 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (irq=%b iackout=%b dtack=%b d=%h oe=%b)", what, irq_n, iackout_n, dtack_n, d_out, d_oe);
    end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  task automatic end_cycle();
    ds0_n = 1'b1; as_n = 1'b1; iackin_n = 1'b1; addr = '0;
    tick(2);
  endtask

  initial begin
    sysreset_n = 1'b0; int_req = 1'b0; iackin_n = 1'b1; as_n = 1'b1; ds0_n = 1'b1; addr = '0;
    tick(3); sysreset_n = 1'b1; tick(1);
    check(irq_n && iackout_n && dtack_n && !d_oe, "idle after reset");

    int_req = 1'b1; tick(1); int_req = 1'b0;
    check(!irq_n && pending, "IRQ asserted after local request");

    // acknowledge of level 5: pass on
    addr = 3'd5; as_n = 1'b0; iackin_n = 1'b0; #1;
    check(iackout_n, "IACKOUT not in the IACKIN cycle");
    tick(1);
    check(!iackout_n && dtack_n, "other level passed to IACKOUT");
    ds0_n = 1'b0; tick(3);
    check(dtack_n && !d_oe && !irq_n, "no answer for another level");
    end_cycle();
    check(iackout_n, "IACKOUT released with AS");

    // acknowledge of level 3: claim
    addr = 3'd3; as_n = 1'b0; iackin_n = 1'b0; tick(1);
    check(iackout_n, "own level not passed on");
    ds0_n = 1'b0; #1;
    check(dtack_n, "DTACK not in the DS0 cycle");
    tick(1);
    check(!dtack_n && d_oe && d_out == 8'h5A, "STATUS/ID and DTACK one clock after DS0");
    check(irq_n && !pending, "request released on acknowledge");
    tick(2);
    check(!dtack_n && d_out == 8'h5A, "DTACK held while DS0 asserted");
    ds0_n = 1'b1; tick(1);
    check(dtack_n && !d_oe, "DTACK removed one clock after DS0 rises");
    end_cycle();

    // level 3 acknowledge with nothing pending: pass on
    addr = 3'd3; as_n = 1'b0; iackin_n = 1'b0; tick(1);
    check(!iackout_n, "no pending request: passed on");
    ds0_n = 1'b0; tick(2);
    check(dtack_n, "no answer when nothing pending");
    end_cycle();

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
