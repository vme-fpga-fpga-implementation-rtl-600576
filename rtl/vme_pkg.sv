// vme_pkg: types and constants shared by the VME system controller blocks.
//
// The VMEbus (IEEE 1014 Rev. C.1) has four bus-request/grant levels and
// seven interrupt-request levels; these counts follow the bus standard as the
// controller described here uses it. All bus-side signals in this design are
// active low and carry an _n suffix, as on the real backplane; wired-OR
// (open-collector) lines are modelled in the top level as AND of the drivers'
// active-low outputs.
package vme_pkg;

  // Number of bus request/grant levels, BR0..BR3 / BG0..BG3.
  localparam int unsigned ARB_LEVELS = 4;
  // Number of interrupt request lines, IRQ1..IRQ7.
  localparam int unsigned IRQ_LEVELS = 7;
  // Width of the STATUS/ID byte returned on D0-D7 during an IACK cycle.
  localparam int unsigned STATUS_W   = 8;

  // Bus-request level, 0..3.
  typedef logic [1:0] br_level_t;
  // Interrupt level, 0 = none, 1..7 = IRQ1..IRQ7 (also the A01-A03 code).
  typedef logic [2:0] irq_level_t;

  // Arbiter states.
  typedef enum logic [1:0] {
    ARB_IDLE  = 2'd0,   // bus free, waiting for a request
    ARB_GRANT = 2'd1,   // BGxIN driven, waiting for BBSY
    ARB_BUSY  = 2'd2,   // a master holds BBSY
    ARB_WAIT  = 2'd3    // BBSY released, one idle cycle before next grant
  } arb_state_t;

  // Highest asserted bit of an active-high 4-bit request vector.
  function automatic br_level_t highest_br(input logic [ARB_LEVELS-1:0] req);
    br_level_t lvl;
    lvl = '0;
    for (int i = 0; i < ARB_LEVELS; i++)
      if (req[i]) lvl = br_level_t'(i);
    return lvl;
  endfunction

  // Highest asserted interrupt level of active-high IRQ1..IRQ7 (bit 0 = IRQ1),
  // 0 if none.
  function automatic irq_level_t highest_irq(input logic [IRQ_LEVELS-1:0] irq);
    irq_level_t lvl;
    lvl = '0;
    for (int i = 0; i < IRQ_LEVELS; i++)
      if (irq[i]) lvl = irq_level_t'(i + 1);
    return lvl;
  endfunction

endpackage
