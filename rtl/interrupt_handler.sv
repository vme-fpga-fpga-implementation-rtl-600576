// interrupt_handler: slot-2 VMEbus interrupt handler.
//
// The seven interrupt request lines IRQ1*..IRQ7* are priority-encoded into the
// processor's interrupt priority level IPL0*..IPL2* (active low, the binary
// number of the highest asserted IRQ, 7 highest). When the processor
// acknowledges (iack_req), the handler latches the level being served, asks
// the board's requester for the bus with DWB*, and once DGB* comes back runs
// a VMEbus interrupt-acknowledge cycle: it puts the level on A01-A03, asserts
// IACK* and AS*, then DS0*, and waits for DTACK* from the interrupter that
// claims the level. The 8-bit STATUS/ID on D0-D7 is latched, handed to the
// processor with a one-cycle status_valid, and the strobes, IACK* and DWB* are
// negated. A BERR* (from the bus timer) ends the cycle with iack_error.
//
// Interface: bus lines active low; irq_n[0] is IRQ1*. Timing: IPL follows IRQ
// combinationally; the acknowledge cycle takes REQ (until DGB), one address
// cycle, the strobe phase (until DTACK or BERR), then a release phase that
// waits for DTACK* to be negated.
//
// The IRQ-to-IPL encoding, the DWB request to the requester and the 8-bit
// STATUS/ID read on DS0 follow the design description. The handshake order
// and the phase lengths are choices of this implementation.
module interrupt_handler
  import vme_pkg::*;
(
  input  logic                  clk,
  input  logic                  sysreset_n,
  // VMEbus side
  input  logic [IRQ_LEVELS-1:0] irq_n,       // IRQ7*..IRQ1* (bit 0 = IRQ1*)
  input  logic                  dtack_n,     // DTACK*
  input  logic                  berr_n,      // BERR*
  input  logic [STATUS_W-1:0]   d_in,        // D0-D7
  output logic                  iack_n,      // IACK*
  output logic                  as_n,        // AS*
  output logic                  ds0_n,       // DS0*
  output irq_level_t            addr,        // A01-A03
  // requester side
  output logic                  dwb_n,       // DWB* device wants bus
  input  logic                  dgb_n,       // DGB* device granted bus
  // processor side
  output logic [2:0]            ipl_n,       // IPL2*..IPL0*
  input  logic                  iack_req,    // processor acknowledges IPL level
  output logic [STATUS_W-1:0]   status_id,   // STATUS/ID read from the bus
  output logic                  status_valid,// one-cycle pulse, status_id valid
  output logic                  iack_error,  // one-cycle pulse, cycle ended by BERR
  output logic                  ack_busy     // acknowledge in progress
);

  typedef enum logic [2:0] {
    IH_IDLE   = 3'd0,
    IH_REQ    = 3'd1,   // DWB asserted, waiting for DGB
    IH_ADDR   = 3'd2,   // A01-A03, IACK*, AS* driven
    IH_STROBE = 3'd3,   // DS0* driven, waiting for DTACK* or BERR*
    IH_REL    = 3'd4    // strobes negated, waiting for DTACK*/BERR* to rise
  } ih_state_t;

  ih_state_t  state;
  irq_level_t cur_level;   // level encoded from IRQ
  irq_level_t ack_level;   // level being acknowledged

  assign cur_level = highest_irq(~irq_n);
  assign ipl_n     = ~cur_level;

  always_ff @(posedge clk) begin
    if (!sysreset_n) begin
      state        <= IH_IDLE;
      ack_level    <= '0;
      status_id    <= '0;
      status_valid <= 1'b0;
      iack_error   <= 1'b0;
    end else begin
      status_valid <= 1'b0;
      iack_error   <= 1'b0;
      unique case (state)
        IH_IDLE: if (iack_req && cur_level != '0) begin
          ack_level <= cur_level;
          state     <= IH_REQ;
        end
        IH_REQ:  if (!dgb_n) state <= IH_ADDR;
        IH_ADDR: state <= IH_STROBE;
        IH_STROBE: begin
          if (!dtack_n) begin
            status_id    <= d_in;
            status_valid <= 1'b1;
            state        <= IH_REL;
          end else if (!berr_n) begin
            iack_error <= 1'b1;
            state      <= IH_REL;
          end
        end
        IH_REL:  if (dtack_n && berr_n) state <= IH_IDLE;
        default: state <= IH_IDLE;
      endcase
    end
  end

  assign dwb_n    = !(state inside {IH_REQ, IH_ADDR, IH_STROBE});
  assign iack_n   = !(state inside {IH_ADDR, IH_STROBE});
  assign as_n     = !(state inside {IH_ADDR, IH_STROBE});
  assign ds0_n    = !(state == IH_STROBE);
  assign addr     = (state inside {IH_ADDR, IH_STROBE}) ? ack_level : '0;
  assign ack_busy = (state != IH_IDLE);

  // The bus is only driven while the requester grants it.
  a_bus_owned: assert property (@(posedge clk) disable iff (!sysreset_n)
                                !as_n |-> !dgb_n);

endmodule
