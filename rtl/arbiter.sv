// arbiter: slot-1 priority arbiter of the VMEbus data transfer bus (DTB).
//
// Four request levels BR3..BR0 (BR3 highest) are watched. When the bus is
// free (BBSY negated) the highest pending level is chosen (the A_PRI priority
// encoder), stored in a level register (DFF) and decoded (DEMUX) onto one of
// the four bus-grant daisy-chain starts bg_n[3:0], which feed BGxIN of slot 2.
// The grant is held until a requester answers by asserting BBSY; the arbiter
// then withdraws it and stays busy until BBSY is released (the SEL control,
// clocked by SYSCLK and cleared by SYSRESET). While a master holds the bus,
// BCLR_GEN compares the stored level of the current master with the highest
// pending request and asserts BCLR when a higher level is waiting; a level-3
// master is never asked to clear (Table "BCLR generation" of the design).
//
// Interface: all bus lines are active low. bg_n is decoded from registers;
// bclr_n is combinational from the level register and the BR inputs.
// Timing: a request seen with BBSY negated is granted on the next clock edge;
// the grant is withdrawn on the edge after BBSY is seen asserted.
//
// The priority order, the BCLR rule and the A_PRI/DEMUX/DFF/SEL/BCLR_GEN
// partition follow the design description. The state encoding, the single
// SYSCLK domain and the withdrawal of an unanswered grant when its request
// disappears are choices of this implementation.
module arbiter
  import vme_pkg::*;
#(
  parameter int unsigned LEVELS = ARB_LEVELS
) (
  input  logic              clk,          // system clock (32 MHz)
  input  logic              sysreset_n,   // SYSRESET*, synchronous, active low
  input  logic [LEVELS-1:0] br_n,         // BR3*..BR0* request lines
  input  logic              bbsy_n,       // BBSY* bus busy
  output logic [LEVELS-1:0] bg_n,         // BG3IN*..BG0IN* of the next slot
  output logic              bclr_n,       // BCLR* bus clear
  output logic [$clog2(LEVELS)-1:0] master_level, // level of current master
  output logic              busy          // a master holds the bus
);

  localparam int unsigned LW = $clog2(LEVELS);

  arb_state_t       state;
  logic [LW-1:0]    level_q;      // DFF: level granted / of current master
  logic [LEVELS-1:0] req;         // active-high requests
  logic             any_req;
  logic [LW-1:0]    top_level;    // A_PRI output

  assign req     = ~br_n;
  assign any_req = |req;

  // A_PRI: highest pending level.
  always_comb begin
    top_level = '0;
    for (int i = 0; i < int'(LEVELS); i++)
      if (req[i]) top_level = LW'(i);
  end

  // SEL + DFF: state and level register.
  always_ff @(posedge clk) begin
    if (!sysreset_n) begin
      state   <= ARB_IDLE;
      level_q <= '0;
    end else begin
      unique case (state)
        ARB_IDLE: begin
          if (!bbsy_n) begin
            state <= ARB_BUSY;             // bus already held (e.g. parked)
          end else if (any_req) begin
            state   <= ARB_GRANT;
            level_q <= top_level;
          end
        end
        ARB_GRANT: begin
          if (!bbsy_n)
            state <= ARB_BUSY;
          else if (!req[level_q])
            state <= ARB_IDLE;             // nobody took the grant
        end
        ARB_BUSY: begin
          if (bbsy_n)
            state <= ARB_WAIT;
        end
        ARB_WAIT: begin
          state <= ARB_IDLE;               // one cycle of bus-free before re-arbitration
        end
        default: state <= ARB_IDLE;
      endcase
    end
  end

  // DEMUX: grant onto one daisy-chain line.
  always_comb begin
    bg_n = '1;
    if (state == ARB_GRANT)
      bg_n[level_q] = 1'b0;
  end

  // BCLR_GEN: assert when a higher level than the current master's is pending.
  always_comb begin
    bclr_n = 1'b1;
    if (state == ARB_BUSY)
      for (int i = 0; i < int'(LEVELS); i++)
        if (req[i] && (LW'(i) > level_q)) bclr_n = 1'b0;
  end

  assign master_level = level_q;
  assign busy         = (state == ARB_BUSY);

  // At most one grant line is driven at a time.
  a_one_grant: assert property (@(posedge clk) disable iff (!sysreset_n) $onehot0(~bg_n));
  // No grant while the bus is held.
  a_no_grant_when_busy: assert property (@(posedge clk) disable iff (!sysreset_n)
                                         (state == ARB_BUSY) |-> (bg_n == '1));

endmodule
