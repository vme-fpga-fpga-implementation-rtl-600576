// vme_system_controller: integrated VME system controller.
//
// One chip holds the functions that a VME system otherwise spreads over
// several slots. The slot-1 part (clock driver, priority arbiter, IACK*
// daisy-chain driver, bus timer) and the slot-2/slot-3 part (interrupt
// handler, requester, one interrupter per slot) are wired together here over
// a model of the VMEbus backplane. Open-collector lines (BR*, BBSY*, IRQ*,
// AS*, DS*, IACK*, DTACK*, BERR*) are the AND of every active-low driver on
// them, including the ext_* inputs that stand for boards outside this chip;
// D0-D7 is driven by whichever interrupter enables its data, else by ext_d.
//
// Daisy chains: the arbiter's BG3 output enters slot 2's requester as BG3IN*
// and leaves as bg_out_n[3]; slot 2 does not use levels 0-2, so those grants
// pass straight to bg_out_n[2:0]. The IACK* driver starts IACKIN* of slot 2,
// whose interrupter passes it to slot 3, whose IACKOUT* leaves as iackout_n.
//
// Processor interface (slot-2 master, not part of this design): master_dwb_n
// and dgb_n for data-transfer ownership, ipl_n, iack_req and the STATUS/ID
// result for interrupts. All logic runs on the 32 MHz clock clk32; the 16 MHz
// VME SYSCLK is an output.
//
// The partition into slots and the daisy-chain order follow the system block
// diagram of the design description; the bus model and the ext_* ports are
// choices of this implementation.
module vme_system_controller
  import vme_pkg::*;
#(
  parameter irq_level_t          SLOT2_LEVEL = 3'd3,
  parameter logic [STATUS_W-1:0] SLOT2_ID    = 8'h03,
  parameter irq_level_t          SLOT3_LEVEL = 3'd1,
  parameter logic [STATUS_W-1:0] SLOT3_ID    = 8'h09
) (
  input  logic                  clk32,
  input  logic                  sysreset_n,
  output logic                  sysclk,          // 16 MHz VME SYSCLK
  // other boards on the backplane
  input  logic [ARB_LEVELS-1:0] ext_br_n,
  input  logic                  ext_bbsy_n,
  input  logic [IRQ_LEVELS-1:0] ext_irq_n,
  input  logic                  ext_as_n,
  input  logic                  ext_ds0_n,
  input  logic                  ext_ds1_n,
  input  logic                  ext_iack_n,
  input  logic                  ext_dtack_n,
  input  logic [STATUS_W-1:0]   ext_d,
  // bus as seen on the backplane
  output logic [ARB_LEVELS-1:0] br_n,
  output logic                  bbsy_n,
  output logic                  bclr_n,
  output logic [ARB_LEVELS-1:0] bg_out_n,        // BGxOUT* of slot 2
  output logic [IRQ_LEVELS-1:0] irq_n,
  output logic                  as_n,
  output logic                  ds0_n,
  output logic                  iack_n,
  output logic                  dtack_n,
  output logic                  berr_n,
  output irq_level_t            addr,            // A01-A03
  output logic [STATUS_W-1:0]   d,
  output logic                  slot2_iackout_n, // IACKOUT* of slot 2 = IACKIN* of slot 3
  output logic                  iackout_n,       // IACKOUT* of slot 3
  output logic [1:0]            master_level,    // level of current bus master
  output logic                  arb_busy,        // arbiter sees the bus held
  output logic [7:0]            timer_count,     // bus-timer divider counter
  // slot-2 processor
  input  logic                  master_dwb_n,
  output logic                  dgb_n,
  output logic [2:0]            ipl_n,
  input  logic                  iack_req,
  output logic [STATUS_W-1:0]   status_id,
  output logic                  status_valid,
  output logic                  iack_error,
  // local interrupt sources
  input  logic                  slot2_int_req,
  input  logic                  slot3_int_req,
  output logic                  slot2_pending,   // slot-2 interrupt not yet acknowledged
  output logic                  slot3_pending,
  output logic                  ack_busy         // handler acknowledge in progress
);

  // ---------------- slot 1 ----------------
  logic                  ce16;
  logic [ARB_LEVELS-1:0] arb_bg_n;
  logic                  s1_iackout_n;

  clock_driver u_clock_driver (
    .clk32, .sysreset_n, .sysclk, .ce16
  );

  arbiter #(.LEVELS(ARB_LEVELS)) u_arbiter (
    .clk(clk32), .sysreset_n, .br_n, .bbsy_n,
    .bg_n(arb_bg_n), .bclr_n, .master_level, .busy(arb_busy)
  );

  iack_daisy_chain_driver u_iack_driver (
    .clk(clk32), .sysreset_n, .iack_n, .as_n, .ds0_n, .iackout_n(s1_iackout_n)
  );

  bus_timer u_bus_timer (
    .clk(clk32), .sysreset_n, .ce16, .ds0_n, .ds1_n(ext_ds1_n),
    .berr_n, .count(timer_count)
  );

  // ---------------- slot 2 ----------------
  logic       rq_br_n, rq_bbsy_n, rq_dgb_n, rq_bgout_n;
  logic       ih_dwb_n, ih_iack_n, ih_as_n, ih_ds0_n;
  irq_level_t ih_addr;
  logic       s2_irq_n, s2_d_oe, s2_dtack_n;
  logic [STATUS_W-1:0] s2_d;

  requester u_requester (
    .clk(clk32), .sysreset_n,
    .dwb_n(ih_dwb_n & master_dwb_n), .brx_n(br_n), .bgin_n(arb_bg_n[3]),
    .br_n(rq_br_n), .bbsy_n(rq_bbsy_n), .dgb_n(rq_dgb_n), .bgout_n(rq_bgout_n)
  );

  interrupt_handler u_handler (
    .clk(clk32), .sysreset_n,
    .irq_n, .dtack_n, .berr_n, .d_in(d),
    .iack_n(ih_iack_n), .as_n(ih_as_n), .ds0_n(ih_ds0_n), .addr(ih_addr),
    .dwb_n(ih_dwb_n), .dgb_n(rq_dgb_n),
    .ipl_n, .iack_req, .status_id, .status_valid, .iack_error, .ack_busy
  );

  interrupter #(.LEVEL(SLOT2_LEVEL), .STATUS_ID(SLOT2_ID)) u_slot2_interrupter (
    .clk(clk32), .sysreset_n, .int_req(slot2_int_req), .irq_n(s2_irq_n),
    .iackin_n(s1_iackout_n), .iackout_n(slot2_iackout_n), .as_n, .ds0_n, .addr,
    .d_out(s2_d), .d_oe(s2_d_oe), .dtack_n(s2_dtack_n), .pending(slot2_pending)
  );

  // ---------------- slot 3 ----------------
  logic s3_irq_n, s3_d_oe, s3_dtack_n;
  logic [STATUS_W-1:0] s3_d;

  interrupter #(.LEVEL(SLOT3_LEVEL), .STATUS_ID(SLOT3_ID)) u_slot3_interrupter (
    .clk(clk32), .sysreset_n, .int_req(slot3_int_req), .irq_n(s3_irq_n),
    .iackin_n(slot2_iackout_n), .iackout_n, .as_n, .ds0_n, .addr,
    .d_out(s3_d), .d_oe(s3_d_oe), .dtack_n(s3_dtack_n), .pending(slot3_pending)
  );

  // ---------------- backplane (wired-OR of active-low drivers) ----------------
  logic [IRQ_LEVELS-1:0] s2_irq_vec, s3_irq_vec;
  logic [ARB_LEVELS-1:0] rq_br_vec;

  always_comb begin
    s2_irq_vec = '1;
    s3_irq_vec = '1;
    rq_br_vec  = '1;
    s2_irq_vec[SLOT2_LEVEL - 1] = s2_irq_n;
    s3_irq_vec[SLOT3_LEVEL - 1] = s3_irq_n;
    rq_br_vec[3]                = rq_br_n;
  end

  assign br_n     = ext_br_n & rq_br_vec;
  assign bbsy_n   = ext_bbsy_n & rq_bbsy_n;
  assign irq_n    = ext_irq_n & s2_irq_vec & s3_irq_vec;
  assign as_n     = ext_as_n & ih_as_n;
  assign ds0_n    = ext_ds0_n & ih_ds0_n;
  assign iack_n   = ext_iack_n & ih_iack_n;
  assign dtack_n  = ext_dtack_n & s2_dtack_n & s3_dtack_n;
  assign addr     = ih_addr;
  assign d        = s2_d_oe ? s2_d : (s3_d_oe ? s3_d : ext_d);
  assign dgb_n    = rq_dgb_n;
  assign bg_out_n = {rq_bgout_n, arb_bg_n[2:0]};

endmodule
