// tb_arbitration_workload: four masters competing for the bus.
//
// One requester per level (BR0..BR3) is connected to the arbiter, each on its
// own grant line, sharing BBSY* and the BR* lines as on a backplane. Each
// master asks for the bus at random, keeps it for a random number of clocks
// and gives it up early, within a few clocks, when BCLR* is asserted. For
// 20000 clocks the testbench checks every cycle that:
//   - at most one requester holds BBSY* and at most one device has DGB*;
//   - a grant goes to the highest level requesting in the cycle before it;
//   - BCLR* is asserted exactly when a level above the current master's is
//     requesting while the bus is held (the 4 x 4 bus-clear table);
//   - every level is served, and level 3 never waits longer than a bounded
//     number of clocks.
// Grants, BCLR events and parked-bus reuses are counted; each must occur.
module tb_arbitration_workload;
  timeunit 1ns; timeprecision 1ps;

  localparam int CYCLES = 20000;

  logic       clk = 1'b0;
  logic       sysreset_n;
  logic [3:0] dwb_n;
  logic [3:0] rq_br_n, rq_bbsy_n, dgb_n, bgout_n;
  logic [3:0] br_n, bg_n;
  logic       bbsy_n, bclr_n, busy;
  logic [1:0] master_level;

  int checks = 0, failures = 0;
  int grants[4] = '{default: 0};
  int n_bclr = 0, n_reuse = 0;
  int wait3 = 0, max_wait3 = 0;

  assign br_n   = rq_br_n;
  assign bbsy_n = &rq_bbsy_n;

  arbiter u_arb (.clk, .sysreset_n, .br_n, .bbsy_n, .bg_n, .bclr_n, .master_level, .busy);

  for (genvar l = 0; l < 4; l++) begin : g_rq
    requester u_rq (
      .clk, .sysreset_n, .dwb_n(dwb_n[l]), .brx_n(br_n), .bgin_n(bg_n[l]),
      .br_n(rq_br_n[l]), .bbsy_n(rq_bbsy_n[l]), .dgb_n(dgb_n[l]), .bgout_n(bgout_n[l])
    );
  end

  always #15.625 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s @%0t", what, $time);
    end
  endtask

  // Master behaviour: idle gap, request, hold, release (early on BCLR).
  int hold[4];
  int gap[4];
  int bclr_wait[4];
  always_ff @(posedge clk) begin
    if (!sysreset_n) begin
      dwb_n <= '1;
      for (int l = 0; l < 4; l++) begin
        gap[l] <= 5 + l; hold[l] <= 0; bclr_wait[l] <= 0;
      end
    end else begin
      for (int l = 0; l < 4; l++) begin
        if (dwb_n[l]) begin
          if (gap[l] == 0) begin
            dwb_n[l]     <= 1'b0;
            hold[l]      <= 5 + int'($urandom_range(0, 40));
            bclr_wait[l] <= int'($urandom_range(1, 4));
          end else gap[l] <= gap[l] - 1;
        end else if (!dgb_n[l]) begin
          if (hold[l] == 0 || (!bclr_n && bclr_wait[l] == 0)) begin
            dwb_n[l] <= 1'b1;
            gap[l]   <= int'($urandom_range(0, 60));
          end else begin
            if (hold[l] > 0) hold[l] <= hold[l] - 1;
            if (!bclr_n && bclr_wait[l] > 0) bclr_wait[l] <= bclr_wait[l] - 1;
          end
        end
      end
    end
  end

  // Checker
  logic [3:0] br_prev = '1, bg_prev = '1, dgb_prev = '1;
  logic       bclr_prev = 1'b1;
  initial begin
    sysreset_n = 1'b0;
    repeat (4) @(posedge clk);
    sysreset_n = 1'b1;
    repeat (CYCLES) begin
      @(negedge clk);
      check($countones(~rq_bbsy_n) <= 1, "one BBSY holder");
      check($countones(~dgb_n) <= 1, "one granted device");
      // a new grant goes to the highest level requesting a cycle earlier
      for (int l = 0; l < 4; l++)
        if (!bg_n[l] && bg_prev[l]) begin
          grants[l]++;
          for (int h = l + 1; h < 4; h++)
            check(br_prev[h], $sformatf("grant to %0d while %0d requested", l, h));
          check(!br_prev[l], $sformatf("grant to %0d without a request", l));
        end
      // bus-clear table
      if (busy) begin
        logic exp;
        exp = 1'b0;
        for (int h = 0; h < 4; h++) if (!br_n[h] && h > int'(master_level)) exp = 1'b1;
        check(bclr_n == !exp, $sformatf("BCLR with master %0d, BR %b", master_level, br_n));
      end else
        check(bclr_n, "no BCLR while the bus is not held");
      if (!bclr_n && bclr_prev) n_bclr++;
      // parked-bus reuse: DGB returns without a new grant
      for (int l = 0; l < 4; l++)
        if (!dgb_n[l] && dgb_prev[l] && !rq_bbsy_n[l] && bg_prev[l] && bg_n[l] && rq_br_n[l])
          n_reuse++;
      // level-3 latency
      if (!dwb_n[3] && dgb_n[3]) wait3++;
      else begin
        if (wait3 > max_wait3) max_wait3 = wait3;
        wait3 = 0;
      end
      br_prev = br_n; bg_prev = bg_n; dgb_prev = dgb_n; bclr_prev = bclr_n;
    end
    for (int l = 0; l < 4; l++)
      check(grants[l] > 0, $sformatf("level %0d served %0d times", l, grants[l]));
    check(n_bclr > 0, $sformatf("BCLR asserted %0d times", n_bclr));
    check(n_reuse > 0, $sformatf("parked bus reused %0d times", n_reuse));
    check(max_wait3 < 60, $sformatf("level 3 waited at most %0d clocks", max_wait3));
    $display("grants BR3=%0d BR2=%0d BR1=%0d BR0=%0d bclr=%0d reuse=%0d max_wait3=%0d",
             grants[3], grants[2], grants[1], grants[0], n_bclr, n_reuse, max_wait3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
