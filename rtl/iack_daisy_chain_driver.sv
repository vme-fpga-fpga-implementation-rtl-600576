// iack_daisy_chain_driver: slot-1 IACK* daisy-chain driver.
//
// During an interrupt acknowledge cycle the handler drives IACK*, AS* and
// DS0*. Once IACK and DS0 are both asserted (with AS asserted) this block
// drives IACKOUT* low into IACKIN* of slot 2, starting the IACKIN/IACKOUT
// chain through the interrupters. IACKOUT* is negated again as soon as AS* is
// negated, ending the cycle.
//
// Interface: all lines active low. Timing: IACKOUT* falls on the clock edge
// after IACK* and DS0* are both seen low, and rises on the edge after AS* is
// seen high.
//
// The trigger on DS0 and IACK and the release on AS follow the design
// description; sampling on the system clock and the extra qualification by
// AS are choices of this implementation.
module iack_daisy_chain_driver (
  input  logic clk,
  input  logic sysreset_n,
  input  logic iack_n,       // IACK* from the bus
  input  logic as_n,         // AS* address strobe
  input  logic ds0_n,        // DS0* data strobe 0
  output logic iackout_n     // IACKOUT* to IACKIN* of slot 2
);

  always_ff @(posedge clk) begin
    if (!sysreset_n)              iackout_n <= 1'b1;
    else if (as_n)                iackout_n <= 1'b1;
    else if (!iack_n && !ds0_n)   iackout_n <= 1'b0;
  end

  // The chain is only started inside an acknowledge cycle.
  a_only_in_iack: assert property (@(posedge clk) disable iff (!sysreset_n)
                                   $fell(iackout_n) |-> $past(!iack_n));

endmodule
