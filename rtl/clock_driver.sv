// clock_driver: slot-1 clock driver.
//
// Divides the 32 MHz system clock by two. sysclk is the resulting 16 MHz
// square wave driven onto the VMEbus SYSCLK line; ce16 is a one-cycle clock
// enable, high in every second 32 MHz cycle, that lets logic in the 32 MHz
// domain (the bus timer) count at 16 MHz without a second clock domain.
//
// Interface: clk32 in, sysclk and ce16 out, both registered. Timing: ce16 is
// high in the cycle in which sysclk is low, so each rising edge of sysclk
// coincides with the edge on which ce16 is sampled high.
//
// The 32 MHz to 16 MHz division follows the design description; the clock
// enable output is a choice of this implementation.
module clock_driver (
  input  logic clk32,        // 32 MHz system clock
  input  logic sysreset_n,   // synchronous reset, active low
  output logic sysclk,       // 16 MHz SYSCLK
  output logic ce16          // 16 MHz clock enable in the 32 MHz domain
);

  logic div_q;

  always_ff @(posedge clk32) begin
    if (!sysreset_n) div_q <= 1'b0;
    else             div_q <= ~div_q;
  end

  assign sysclk = div_q;
  assign ce16   = ~div_q;

endmodule
