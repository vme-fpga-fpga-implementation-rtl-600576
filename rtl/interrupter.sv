// interrupter: VMEbus interrupter of one interrupt level (slots 2 and 3).
//
// A local interrupt request (int_req, one-cycle pulse or level) sets a pending
// flag that drives the interrupter's IRQ* line. When IACKIN* arrives during an
// acknowledge cycle the interrupter compares the level on A01-A03 with its own
// LEVEL. If they match and a request is pending it claims the cycle: on DS0*
// it drives its 8-bit STATUS_ID on D0-D7 and asserts DTACK*, and clears the
// pending request (release on acknowledge). Otherwise it passes the low level
// on to IACKOUT*, for the next slot. Everything is released when AS* (or, for
// DTACK*, DS0*) is negated.
//
// Interface: bus lines active low; d_oe tells the bus model when d_out is
// driven. Timing: the claim-or-pass decision is taken on the edge after
// IACKIN* is seen low; DTACK* follows DS0* by one clock.
//
// Comparing the acknowledged level with its own level, passing IACKOUT
// otherwise, and the 8-bit STATUS/ID on DS0 follow the design description.
// Release on acknowledge and the level and STATUS/ID defaults are choices of
// this implementation.
module interrupter
  import vme_pkg::*;
#(
  parameter irq_level_t           LEVEL     = 3'd1,
  parameter logic [STATUS_W-1:0]  STATUS_ID = 8'h01
) (
  input  logic                 clk,
  input  logic                 sysreset_n,
  input  logic                 int_req,     // local device interrupt request
  output logic                 irq_n,       // IRQx* of LEVEL
  input  logic                 iackin_n,    // IACKIN*
  output logic                 iackout_n,   // IACKOUT*
  input  logic                 as_n,        // AS*
  input  logic                 ds0_n,       // DS0*
  input  irq_level_t           addr,        // A01-A03
  output logic [STATUS_W-1:0]  d_out,       // D0-D7 when d_oe
  output logic                 d_oe,
  output logic                 dtack_n,     // DTACK*
  output logic                 pending      // request not yet acknowledged
);

  typedef enum logic [1:0] {
    IT_IDLE = 2'd0,
    IT_PASS = 2'd1,   // IACKOUT* driven for the next slot
    IT_RESP = 2'd2,   // claimed: answer DS0* with STATUS/ID and DTACK*
    IT_DONE = 2'd3    // answered, waiting for AS* to be negated
  } it_state_t;

  it_state_t state;
  logic      dtack_q;

  always_ff @(posedge clk) begin
    if (!sysreset_n) begin
      state   <= IT_IDLE;
      pending <= 1'b0;
      dtack_q <= 1'b0;
    end else begin
      if (int_req) pending <= 1'b1;
      unique case (state)
        IT_IDLE: if (!iackin_n && !as_n)
          state <= (pending && addr == LEVEL) ? IT_RESP : IT_PASS;
        IT_PASS: if (as_n) state <= IT_IDLE;
        IT_RESP: begin
          if (as_n) begin
            state   <= IT_IDLE;
            dtack_q <= 1'b0;
          end else if (!ds0_n && !dtack_q) begin
            dtack_q <= 1'b1;
            pending <= 1'b0;
          end else if (ds0_n && dtack_q) begin
            dtack_q <= 1'b0;
            state   <= IT_DONE;
          end
        end
        IT_DONE: if (as_n) state <= IT_IDLE;
        default: state <= IT_IDLE;
      endcase
    end
  end

  assign irq_n     = !pending;
  assign iackout_n = !(state == IT_PASS);
  assign dtack_n   = !dtack_q;
  assign d_oe      = dtack_q;
  assign d_out     = dtack_q ? STATUS_ID : '0;

  // DTACK* is only driven in a claimed cycle.
  a_dtack_claimed: assert property (@(posedge clk) disable iff (!sysreset_n)
                                    !dtack_n |-> (state == IT_RESP));

endmodule
