// bus_timer: slot-1 VMEbus bus timer.
//
// The bus timer ends a data-transfer cycle that nobody answers, so that the
// bus cannot dead-lock. It runs at 16 MHz (the 32 MHz system clock divided by
// two, supplied here as the clock enable ce16). While either data strobe DS0*
// or DS1* is asserted an 8-bit counter counts the 16 MHz ticks; its most
// significant bit is a 62.5 kHz square wave (16 MHz / 256, period 16 us). Each
// rising edge of that bit shifts a one into a 4-bit shift register, and the
// last stage drives BERR*. The first rising edge comes 128 ticks (8 us) after
// the strobe, the fourth after 128 + 3 * 256 = 896 ticks, i.e. 56 us. BERR* then
// stays asserted until both strobes are negated, which clears the counter and
// the shift register.
//
// Interface: clk is the 32 MHz clock, ce16 the 16 MHz enable, ds0_n/ds1_n the
// bus strobes, berr_n the bus error output (active low) and count the 8-bit
// counter value (for observation). Timing: BERR* falls on the edge that ends
// the 896th enabled cycle with a strobe asserted (1792 cycles of 32 MHz).
//
// The 16 MHz clock, the 8-bit divide-by-256 counter, the 4-bit shift register,
// the 56 us timeout and the hold of BERR until the cycle ends follow the
// design description. Using the counter's top bit as the shift clock (which is
// what makes 4 stages give 56 us) and watching the data strobes rather than
// the address strobe are this implementation's reading of it.
module bus_timer #(
  parameter int unsigned CNT_W = 8,   // divide-by-2**CNT_W counter
  parameter int unsigned SR_W  = 4    // shift-register stages
) (
  input  logic             clk,
  input  logic             sysreset_n,
  input  logic             ce16,      // 16 MHz clock enable
  input  logic             ds0_n,     // DS0*
  input  logic             ds1_n,     // DS1*
  output logic             berr_n,    // BERR*
  output logic [CNT_W-1:0] count      // divider counter (DOUT)
);

  logic [CNT_W-1:0] cnt_q;
  logic [SR_W-1:0]  sr_q;
  logic             active;
  logic             tick;     // rising edge of the counter MSB

  assign active = !ds0_n || !ds1_n;
  assign tick   = ce16 && (cnt_q == {1'b0, {(CNT_W-1){1'b1}}});

  always_ff @(posedge clk) begin
    if (!sysreset_n || !active) begin
      cnt_q <= '0;
      sr_q  <= '0;
    end else if (ce16) begin
      cnt_q <= cnt_q + 1'b1;
      if (tick) sr_q <= {sr_q[SR_W-2:0], 1'b1};
    end
  end

  assign berr_n = !sr_q[SR_W-1];
  assign count  = cnt_q;

  // BERR is released on the edge after both strobes are negated.
  a_berr_release: assert property (@(posedge clk) disable iff (!sysreset_n)
                                   (!berr_n && !active) |=> berr_n);

endmodule
