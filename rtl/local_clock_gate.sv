// local_clock_gate: glitch-free gating of the global clock into one local
// clock.
//
// A latch, transparent while ck is low, captures the enable; the local clock
// is ck AND the latched enable. The enable may therefore change at any time
// while ck is high (for example because the flip-flops it is computed from
// have just toggled) without cutting or adding a pulse: each ck cycle gives
// either one full high pulse or none.
//
// Interface: ck (global clock), en (toggle request, must settle before the
// rising edge of ck), gclk (local clock). gclk rises with ck when en was high
// at that edge.
//
// The design produces its local clock pulses with dynamic (precharge /
// evaluate) circuits whose outputs are held for the clock-high phase; this
// latch-and-AND gate is the standard-cell equivalent chosen here. The latch
// is intended.
module local_clock_gate (
  input  logic ck,
  input  logic en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!ck) en_latched = en;
  end

  assign gclk = ck & en_latched;

endmodule
