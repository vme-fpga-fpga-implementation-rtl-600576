// tb_arbiter: self-checking testbench of the priority arbiter.
//
// Checks, against expectations computed here: (1) for every one of the 15
// non-empty request patterns the grant goes to the highest level exactly one
// clock after the request, and is held while BBSY stays negated; (2) the grant
// is withdrawn one clock after BBSY is asserted; (3) the full 4 x 4 BCLR table:
// with a master of level L holding the bus, BCLR is asserted exactly when the
// pending level P is above L; (4) after BBSY is released a new request is
// granted again. Inputs change on the falling clock edge.
module tb_arbiter;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       sysreset_n;
  logic [3:0] br_n;
  logic       bbsy_n;
  logic [3:0] bg_n;
  logic       bclr_n;
  logic [1:0] master_level;
  logic       busy;

  int checks = 0, failures = 0;

  arbiter dut (.*);

  always #15.625 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s  (bg_n=%b bclr_n=%b lvl=%0d)", what, bg_n, bclr_n, master_level);
    end
  endtask

  function automatic int top_of(input logic [3:0] r);
    int t = -1;
    for (int i = 0; i < 4; i++) if (r[i]) t = i;
    return t;
  endfunction

  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  // Release the bus and let the arbiter return to idle.
  task automatic free_bus();
    br_n = '1; bbsy_n = 1'b1;
    tick(3);
  endtask

  initial begin
    sysreset_n = 1'b0; br_n = '1; bbsy_n = 1'b1;
    tick(3);
    sysreset_n = 1'b1;
    tick(2);
    check(bg_n == 4'b1111 && bclr_n, "idle after reset");

    // (1)+(2) priority order for every pattern
    for (int pat = 1; pat < 16; pat++) begin
      int t;
      t = top_of(4'(pat));
      br_n = ~4'(pat);
      tick(1);
      check(bg_n == ~(4'b1 << t), $sformatf("grant of pattern %b one clock after request", 4'(pat)));
      tick(3);
      check(bg_n == ~(4'b1 << t), $sformatf("grant of pattern %b held without BBSY", 4'(pat)));
      bbsy_n = 1'b0; br_n[t] = 1'b1;   // winner answers: BBSY on, its BR off
      tick(1);
      check(bg_n == 4'b1111 && busy && master_level == 2'(t), "grant withdrawn after BBSY");
      free_bus();
    end

    // (3) Table: BCLR for current master level L and pending level P
    for (int l = 0; l < 4; l++) begin
      for (int p = 0; p < 4; p++) begin
        br_n = '1; br_n[l] = 1'b0;
        tick(1);
        bbsy_n = 1'b0; br_n = '1;
        tick(1);
        check(busy && master_level == 2'(l), "master in place");
        br_n[p] = 1'b0;
        #1;
        check(bclr_n == !(p > l), $sformatf("BCLR cell master=%0d pending=%0d", l, p));
        tick(1);
        check(bclr_n == !(p > l), $sformatf("BCLR cell master=%0d pending=%0d held", l, p));
        check(bg_n == 4'b1111, "no grant while busy");
        free_bus();
      end
    end

    // (4) a vanished request returns the arbiter to idle
    br_n = 4'b1101; tick(1);
    check(bg_n == 4'b1101, "grant level 1");
    br_n = 4'b1111; tick(2);
    check(bg_n == 4'b1111 && !busy, "unanswered grant withdrawn");
    br_n = 4'b0111; tick(1);
    check(bg_n == 4'b0111, "next request granted after withdrawal");
    free_bus();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
