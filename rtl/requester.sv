// requester: release-on-request (ROR) bus requester for one request level.
//
// A local device (the slot-2 master or its interrupt handler) asks for the
// data transfer bus by asserting DWB ("device wants bus"). The requester
// drives its BR line (BR3 in this system; the level is fixed by which
// BR/BG lines the instance is wired to) and waits for the bus-grant daisy chain
// to bring BGxIN low. It then keeps that grant (BGxOUT stays high), asserts
// BBSY, releases BR and tells the device DGB ("device granted bus") for as long
// as DWB stays asserted. When the device drops DWB the requester keeps BBSY
// (the bus stays parked with this board) until another requester drives any
// BR line; only then is BBSY released. A device that asks again while the bus
// is parked gets DGB at once without a new arbitration. A grant that arrives
// while this board is not requesting is passed on to BGxOUT.
//
// Interface: bus lines active low; brx_n is the whole set of BR lines as seen
// on the backplane. Timing: BR is driven on the edge after DWB; BBSY and DGB
// on the edge after BGxIN falls; BBSY is released on the edge after another
// request appears on a parked bus.
//
// The choice of ROR, of level 3 and the DWB/DGB/BR3/BBSY/BGxIN/BGxOUT pins
// follow the design description. The rule that a new request is not started
// while a grant is passing through, and the clocked implementation, are
// choices of this implementation.
module requester
  import vme_pkg::*;
(
  input  logic                  clk,
  input  logic                  sysreset_n,
  input  logic                  dwb_n,     // DWB* device wants bus
  input  logic [ARB_LEVELS-1:0] brx_n,     // BR3*..BR0* as on the backplane
  input  logic                  bgin_n,    // BGxIN* of this slot
  output logic                  br_n,      // BRx* driven by this board
  output logic                  bbsy_n,    // BBSY* driven by this board
  output logic                  dgb_n,     // DGB* device granted bus
  output logic                  bgout_n    // BGxOUT* to the next slot
);

  typedef enum logic [1:0] {
    RQ_IDLE = 2'd0,   // not requesting, grant passes through
    RQ_REQ  = 2'd1,   // BR driven, waiting for BGxIN
    RQ_OWN  = 2'd2    // BBSY held (in use or parked)
  } rq_state_t;

  rq_state_t state;
  logic      other_req;

  // While this board holds BBSY it drives no BR line, so any BR seen comes
  // from another requester.
  assign other_req = |(~brx_n);

  always_ff @(posedge clk) begin
    if (!sysreset_n) begin
      state <= RQ_IDLE;
    end else begin
      unique case (state)
        RQ_IDLE: if (!dwb_n && bgin_n) state <= RQ_REQ;
        RQ_REQ:  if (!bgin_n)          state <= RQ_OWN;
        RQ_OWN:  if (dwb_n && other_req) state <= RQ_IDLE;   // release on request
        default: state <= RQ_IDLE;
      endcase
    end
  end

  assign br_n    = !(state == RQ_REQ);
  assign bbsy_n  = !(state == RQ_OWN);
  assign dgb_n   = !((state == RQ_OWN) && !dwb_n);
  assign bgout_n = (state == RQ_IDLE) ? bgin_n : 1'b1;

  // BR and BBSY are never driven together.
  a_br_bbsy: assert property (@(posedge clk) disable iff (!sysreset_n) !(!br_n && !bbsy_n));
  // The device is only told it has the bus while BBSY is held.
  a_dgb: assert property (@(posedge clk) disable iff (!sysreset_n) !dgb_n |-> !bbsy_n);

endmodule
