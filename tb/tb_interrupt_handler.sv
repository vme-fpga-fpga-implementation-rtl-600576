// tb_interrupt_handler: self-checking testbench of the interrupt handler.
//
// Checks: IPL2*..IPL0* for all 128 patterns of IRQ1*..IRQ7* against the level
// of the highest asserted line, found here by scanning from IRQ7 down; no
// acknowledge starts when no IRQ is asserted; an acknowledge of level 6 asks
// for the bus with DWB* one clock after iack_req, waits for DGB*, then drives
// A01-A03 = 6 with IACK* and AS* and, one clock later, DS0*; a DTACK* with a
// STATUS/ID of 0xC3 is latched and reported with status_valid; the strobes and
// DWB* are negated and the handler waits for DTACK* to rise; an acknowledge
// answered by nobody ends with iack_error when BERR* arrives.
module tb_interrupt_handler;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       sysreset_n;
  logic [6:0] irq_n;
  logic       dtack_n, berr_n;
  logic [7:0] d_in;
  logic       iack_n, as_n, ds0_n;
  logic [2:0] addr;
  logic       dwb_n, dgb_n;
  logic [2:0] ipl_n;
  logic       iack_req;
  logic [7:0] status_id;
  logic       status_valid, iack_error, ack_busy;

  int checks = 0, failures = 0;

  interrupt_handler dut (.*);

  always #15.625 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (ipl_n=%b dwb=%b iack=%b as=%b ds0=%b addr=%0d)", what, ipl_n, dwb_n, iack_n, as_n, ds0_n, addr);
    end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  function automatic logic [2:0] ref_level(input logic [6:0] irq_active);
    for (int l = 7; l >= 1; l--) if (irq_active[l-1]) return 3'(l);
    return 3'd0;
  endfunction

  initial begin
    sysreset_n = 1'b0; irq_n = '1; dtack_n = 1'b1; berr_n = 1'b1; d_in = '0;
    dgb_n = 1'b1; iack_req = 1'b0;
    tick(3); sysreset_n = 1'b1; tick(1);

    // IRQ to IPL encoding
    for (int p = 0; p < 128; p++) begin
      irq_n = ~7'(p); #1;
      check(ipl_n == ~ref_level(7'(p)), $sformatf("IPL for IRQ pattern %b", 7'(p)));
    end

    // no acknowledge without a request
    irq_n = '1; iack_req = 1'b1; tick(1); iack_req = 1'b0; tick(2);
    check(dwb_n && !ack_busy, "no acknowledge without an IRQ");

    // acknowledge of level 6
    irq_n = 7'b1011010;          // IRQ6, IRQ3, IRQ1 asserted
    #1 check(ipl_n == ~3'd6, "IPL = 6");
    iack_req = 1'b1; tick(1); iack_req = 1'b0;
    check(!dwb_n && iack_n && as_n, "DWB one clock after iack_req, bus not yet driven");
    tick(3);
    check(!dwb_n && as_n, "waiting for DGB");
    dgb_n = 1'b0; tick(1);
    check(!iack_n && !as_n && ds0_n && addr == 3'd6, "A01-A03 = 6, IACK and AS one clock after DGB");
    tick(1);
    check(!ds0_n && !as_n, "DS0 one clock after AS");
    tick(2);
    check(!ds0_n, "DS0 held until DTACK");
    d_in = 8'hC3; dtack_n = 1'b0; tick(1);
    check(status_valid && status_id == 8'hC3, "STATUS/ID latched on DTACK");
    check(ds0_n && as_n && iack_n && dwb_n, "strobes, IACK and DWB released");
    dgb_n = 1'b1;
    tick(1);
    check(!status_valid && ack_busy, "valid is one cycle, waiting for DTACK release");
    dtack_n = 1'b1; d_in = '0; tick(1);
    check(!ack_busy && status_id == 8'hC3, "back to idle, STATUS/ID kept");

    // acknowledge nobody answers: BERR
    iack_req = 1'b1; tick(1); iack_req = 1'b0;
    dgb_n = 1'b0; tick(3);
    check(!ds0_n && addr == 3'd6, "second acknowledge running");
    berr_n = 1'b0; tick(1);
    check(iack_error && !status_valid && ds0_n && as_n, "BERR ends the cycle with iack_error");
    berr_n = 1'b1; dgb_n = 1'b1; tick(2);
    check(!ack_busy, "idle after BERR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
