// tb_requester: self-checking testbench of the release-on-request requester.
//
// Walks the requester through: a grant passing through while idle; a request
// (BR3 one clock after DWB), the grant (BBSY and DGB one clock after BGxIN,
// BR3 released, grant not passed on); the bus parked after DWB is dropped
// while no other request exists; a repeated request served from the parked
// state without a new arbitration; and the release of BBSY one clock after
// another board drives a BR line. A small arbiter stand-in is not needed: the
// bus lines are driven directly.
module tb_requester;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       sysreset_n;
  logic       dwb_n;
  logic [3:0] brx_n;
  logic       bgin_n;
  logic       br_n, bbsy_n, dgb_n, bgout_n;
  logic [3:0] other_br_n;

  int checks = 0, failures = 0;

  // The backplane BR lines: this board's BR3 plus other boards' requests.
  assign brx_n = other_br_n & {br_n, 3'b111};

  requester dut (.*);

  always #15.625 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (br=%b bbsy=%b dgb=%b bgout=%b)", what, br_n, bbsy_n, dgb_n, bgout_n);
    end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    sysreset_n = 1'b0; dwb_n = 1'b1; other_br_n = '1; bgin_n = 1'b1;
    tick(3);
    sysreset_n = 1'b1;
    tick(1);
    check(br_n && bbsy_n && dgb_n && bgout_n, "idle after reset");

    // grant for someone else passes through
    other_br_n = 4'b0111; bgin_n = 1'b0; #1;
    check(!bgout_n, "grant passed on while idle");
    dwb_n = 1'b0; tick(2);
    check(br_n, "no request started while a grant passes through");
    bgin_n = 1'b1; other_br_n = '1; #1;
    check(bgout_n, "pass-through follows BGxIN");

    // own request
    tick(1);
    check(!br_n && bbsy_n && dgb_n, "BR3 one clock after DWB");
    tick(2);
    check(!br_n && bbsy_n, "BR3 held while waiting");
    bgin_n = 1'b0; #1;
    check(bgout_n, "own grant not passed on");
    tick(1);
    check(br_n && !bbsy_n && !dgb_n && bgout_n, "BBSY and DGB one clock after BGxIN, BR3 released");
    bgin_n = 1'b1;
    tick(4);
    check(!bbsy_n && !dgb_n, "bus held while DWB asserted");

    // another request while DWB still asserted: keep the bus
    other_br_n = 4'b1110; tick(2);
    check(!bbsy_n && !dgb_n, "not released while device still wants bus");
    other_br_n = '1;

    // device done, nobody else: parked
    dwb_n = 1'b1; #1;
    check(dgb_n, "DGB follows DWB");
    tick(5);
    check(!bbsy_n && br_n, "bus parked with BBSY (release on request)");

    // device asks again: served at once from parked state
    dwb_n = 1'b0; #1;
    check(!dgb_n && br_n, "parked bus re-used without arbitration");
    tick(2);
    dwb_n = 1'b1; tick(1);

    // another board requests: release one clock later
    other_br_n = 4'b1011; #1;
    check(!bbsy_n, "BBSY still held in the cycle of the request");
    tick(1);
    check(bbsy_n && dgb_n && br_n, "BBSY released one clock after other request");
    other_br_n = '1; tick(2);
    check(bbsy_n && br_n, "idle again");

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
