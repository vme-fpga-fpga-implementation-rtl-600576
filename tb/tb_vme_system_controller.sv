// tb_vme_system_controller: end-to-end testbench of the VME system controller.
//
// The top is used with its default parameters (slot-2 interrupter on IRQ3
// with STATUS/ID 0x03, slot-3 interrupter on IRQ1 with STATUS/ID 0x09). The
// testbench plays the slot-2 processor and one other bus master on request
// level 1 (BR1/BG1), and runs in order:
//   1. the processor asks for the bus; BR3 -> BG3 -> BBSY/DGB;
//   2. it drops DWB and the bus stays parked; a second request is served
//      from the parked bus; the other master's BR1 then makes the requester
//      release BBSY (release on request) and the arbiter grants BG1, which
//      passes through slot 2 to bg_out_n[1];
//   3. with the level-1 master on the bus, the processor's BR3 makes the
//      arbiter assert BCLR; when the level-1 master leaves, slot 2 is granted;
//   4. both interrupters request; IPL shows 3; the processor acknowledges:
//      the handler takes the bus, the IACK* daisy chain starts, slot 2 claims
//      level 3 and returns 0x03; IPL then shows 1 and a second acknowledge
//      passes through slot 2 to slot 3, which returns 0x09; in neither cycle
//      may IACK* leave the system;
//   5. an IRQ4 from outside is acknowledged but nobody answers: the daisy
//      chain leaves the system at iackout_n and the bus timer's BERR, 56 us
//      after DS0, ends the cycle with iack_error;
//   6. an outside master's data strobe left asserted is also ended by BERR.
// Each mechanism is counted; one that never happened is a failure.
module tb_vme_system_controller;
  timeunit 1ns; timeprecision 1ps;

  logic       clk32 = 1'b0;
  logic       sysreset_n;
  logic       sysclk;
  logic [3:0] ext_br_n;
  logic       ext_bbsy_n;
  logic [6:0] ext_irq_n;
  logic       ext_as_n, ext_ds0_n, ext_ds1_n, ext_iack_n, ext_dtack_n;
  logic [7:0] ext_d;
  logic [3:0] br_n;
  logic       bbsy_n, bclr_n;
  logic [3:0] bg_out_n;
  logic [6:0] irq_n;
  logic       as_n, ds0_n, iack_n, dtack_n, berr_n;
  logic [2:0] addr;
  logic [7:0] d;
  logic       slot2_iackout_n, iackout_n;
  logic [1:0] master_level;
  logic       arb_busy;
  logic [7:0] timer_count;
  logic       master_dwb_n, dgb_n;
  logic [2:0] ipl_n;
  logic       iack_req;
  logic [7:0] status_id;
  logic       status_valid, iack_error;
  logic       slot2_int_req, slot3_int_req;
  logic       slot2_pending, slot3_pending, ack_busy;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_grant3 = 0, n_park_reuse = 0, n_ror_release = 0, n_passthrough = 0;
  int n_bclr = 0, n_claim2 = 0, n_claim3 = 0, n_chain_pass = 0;
  int n_berr = 0, n_iack_error = 0;

  vme_system_controller dut (.*);

  always #15.625 clk32 = ~clk32;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk32);
  endtask

  // Wait until cond (sampled on negedges) or limit; returns cycles waited.
  `define WAIT_FOR(cond, limit, n) \
    n = 0; while (!(cond) && n < (limit)) begin tick(1); n++; end

  // count events seen on the bus
  // During acknowledges that slot 2 or 3 answers, IACK* must not leave the
  // system: the chain stops at the board that claims.
  logic in_claimed_ack = 1'b0;
  int   n_chain_leak = 0;
  logic bclr_q = 1'b1, berr_q = 1'b1, bg1_q = 1'b1;
  always @(negedge clk32) begin
    if (in_claimed_ack && !iackout_n) n_chain_leak++;
    if (!bclr_n && bclr_q) n_bclr++;
    if (!berr_n && berr_q) n_berr++;
    if (!bg_out_n[1] && bg1_q) n_passthrough++;
    if (iack_error) n_iack_error++;
    bclr_q = bclr_n; berr_q = berr_n; bg1_q = bg_out_n[1];
  end

  initial begin
    int n;
    realtime t0;
    sysreset_n = 1'b0;
    ext_br_n = '1; ext_bbsy_n = 1'b1; ext_irq_n = '1;
    ext_as_n = 1'b1; ext_ds0_n = 1'b1; ext_ds1_n = 1'b1; ext_iack_n = 1'b1; ext_dtack_n = 1'b1;
    ext_d = '0; master_dwb_n = 1'b1; iack_req = 1'b0;
    slot2_int_req = 1'b0; slot3_int_req = 1'b0;
    tick(4); sysreset_n = 1'b1; tick(2);
    check(bbsy_n && bclr_n && dgb_n && bg_out_n == 4'hF && berr_n && ipl_n == 3'b111, "idle after reset");

    // 1. slot-2 master takes the bus
    master_dwb_n = 1'b0;
    `WAIT_FOR(!dgb_n, 20, n)
    check(!dgb_n && !bbsy_n && br_n[3], "slot 2 granted: DGB, BBSY, BR3 released");
    check(n <= 4, $sformatf("grant took %0d clocks", n));
    check(master_level == 2'd3, "arbiter records level 3");
    if (!dgb_n) n_grant3++;

    // 2. park, reuse, release on request
    master_dwb_n = 1'b1; tick(5);
    check(!bbsy_n && dgb_n, "bus parked with slot 2");
    master_dwb_n = 1'b0; #1;
    check(!dgb_n && br_n == 4'hF, "parked bus reused without a request");
    if (!dgb_n && br_n == 4'hF) n_park_reuse++;
    tick(3); master_dwb_n = 1'b1; tick(1);
    ext_br_n[1] = 1'b0;                        // other master asks on level 1
    `WAIT_FOR(bbsy_n, 10, n)
    check(bbsy_n, "BBSY released on other request");
    if (bbsy_n) n_ror_release++;
    `WAIT_FOR(!bg_out_n[1], 10, n)
    check(!bg_out_n[1], "BG1 passed through slot 2");
    ext_bbsy_n = 1'b0; ext_br_n[1] = 1'b1;     // level-1 master takes the bus
    tick(2);
    check(bg_out_n[1] && master_level == 2'd1 && arb_busy, "level-1 master on the bus");

    // 3. BCLR: slot 2 asks on level 3 while level 1 holds the bus
    master_dwb_n = 1'b0;
    `WAIT_FOR(!bclr_n, 10, n)
    check(!bclr_n && !br_n[3], "BCLR for higher pending level");
    tick(5);
    ext_bbsy_n = 1'b1;                         // level-1 master leaves
    `WAIT_FOR(!dgb_n, 20, n)
    check(!dgb_n && bclr_n, "slot 2 granted after level-1 master left");
    if (!dgb_n) n_grant3++;
    master_dwb_n = 1'b1; tick(2);

    // 4. interrupts from slot 2 (IRQ3) and slot 3 (IRQ1)
    slot2_int_req = 1'b1; slot3_int_req = 1'b1; tick(1);
    slot2_int_req = 1'b0; slot3_int_req = 1'b0; tick(1);
    check(!irq_n[2] && !irq_n[0] && ipl_n == ~3'd3, "IRQ3, IRQ1 asserted, IPL = 3");
    in_claimed_ack = 1'b1;
    iack_req = 1'b1; tick(1); iack_req = 1'b0;
    `WAIT_FOR(status_valid, 200, n)
    check(status_valid && status_id == 8'h03, "slot 2 returns STATUS/ID 0x03");
    if (status_valid && status_id == 8'h03) n_claim2++;
    `WAIT_FOR(!ack_busy, 50, n)
    tick(2);
    check(!slot2_pending && slot3_pending && ipl_n == ~3'd1, "IRQ3 released, IPL = 1");
    iack_req = 1'b1; tick(1); iack_req = 1'b0;
    `WAIT_FOR(!as_n, 50, n)
    `WAIT_FOR(!slot2_iackout_n, 20, n)
    check(!slot2_iackout_n && iackout_n, "slot 2 passes IACK to slot 3");
    if (!slot2_iackout_n) n_chain_pass++;
    `WAIT_FOR(status_valid, 200, n)
    check(status_valid && status_id == 8'h09, "slot 3 returns STATUS/ID 0x09");
    if (status_valid && status_id == 8'h09) n_claim3++;
    `WAIT_FOR(!ack_busy, 50, n)
    tick(2);
    check(!slot3_pending && ipl_n == 3'b111 && irq_n == '1, "all interrupts served");
    in_claimed_ack = 1'b0;
    check(n_chain_leak == 0, $sformatf("IACK* left the system in %0d cycles of claimed acknowledges", n_chain_leak));

    // 5. an outside IRQ4 nobody in this system answers: BERR ends the cycle
    ext_irq_n[3] = 1'b0; tick(1);
    check(ipl_n == ~3'd4, "IPL = 4");
    iack_req = 1'b1; tick(1); iack_req = 1'b0;
    `WAIT_FOR(!ds0_n, 50, n)
    t0 = $realtime;
    `WAIT_FOR(!iackout_n, 20, n)
    check(!iackout_n, "IACK chain leaves the system");
    `WAIT_FOR(!berr_n, 3000, n)
    check(!berr_n, "BERR on unanswered acknowledge");
    check($realtime - t0 > 55900.0 && $realtime - t0 < 56100.0,
          $sformatf("BERR %0.1f ns after DS0, expected 56000", $realtime - t0));
    `WAIT_FOR(!ack_busy, 20, n)
    check(!ack_busy && berr_n && iackout_n, "cycle ended, BERR and IACKOUT released");
    ext_irq_n = '1; tick(2);

    // 6. an outside master's DS1 left asserted
    ext_as_n = 1'b0; ext_ds1_n = 1'b0; t0 = $realtime;
    `WAIT_FOR(!berr_n, 3000, n)
    check(!berr_n && $realtime - t0 > 55900.0 && $realtime - t0 < 56100.0, "BERR 56 us after DS1");
    ext_as_n = 1'b1; ext_ds1_n = 1'b1; tick(2);
    check(berr_n, "BERR released with the strobe");

    // every mechanism happened
    check(n_grant3 == 2, $sformatf("slot-2 grants: %0d", n_grant3));
    check(n_park_reuse == 1, $sformatf("parked-bus reuses: %0d", n_park_reuse));
    check(n_ror_release == 1, $sformatf("release-on-request: %0d", n_ror_release));
    check(n_passthrough >= 1, $sformatf("grant pass-throughs: %0d", n_passthrough));
    check(n_bclr >= 1, $sformatf("BCLR assertions: %0d", n_bclr));
    check(n_claim2 == 1, $sformatf("slot-2 claims: %0d", n_claim2));
    check(n_chain_pass == 1, $sformatf("IACK chain pass to slot 3: %0d", n_chain_pass));
    check(n_claim3 == 1, $sformatf("slot-3 claims: %0d", n_claim3));
    check(n_berr == 2, $sformatf("BERR timeouts: %0d", n_berr));
    check(n_iack_error == 1, $sformatf("acknowledges ended by BERR: %0d", n_iack_error));
    $display("mechanisms: grant3=%0d park_reuse=%0d ror_release=%0d passthrough=%0d bclr=%0d claim2=%0d chain_pass=%0d claim3=%0d berr=%0d iack_error=%0d",
             n_grant3, n_park_reuse, n_ror_release, n_passthrough, n_bclr, n_claim2, n_chain_pass, n_claim3, n_berr, n_iack_error);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk32);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
