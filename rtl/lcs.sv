// lcs: local clock selector for one higher-order counter section.
//
// The final decision on which higher-order bits receive a clock pulse. Bit k
// of the section is pulsed when the real carry ci_in from the lower-order
// section is active and the pre-evaluator has flagged bit k (ci[k] for an up
// count or cib[k] for a down count). With ci_in inactive no pulse is issued
// and all of the section's flip-flops hold. The carry out, co, is ci_in
// passed on when the whole section propagates (pall), for a further section.
//
// Because ci, cib and pall are prepared ahead of time, the only signal that
// has to travel the long path is ci_in, and it meets a single gate per bit.
//
// Interface: ck global clock; ci_in real carry from the lower section; ci,
// cib, pall from the pre-evaluator; lc[k] local clock of section bit k; co
// carry to the next section. Timing: inputs settle while ck is low; lc[k]
// follows ck high for that cycle; co is combinational.
//
// Following the design: the combination of the real carry with CI0-CI3 /
// CIB0-CIB3, the outputs LC0-LC3 and Co, and stacking inverters in this
// block. This implementation's choices: a static AND-OR selection (the design
// leaves the choice between a domino and a pass-transistor selector open),
// and the latch-based clock gate that forms the pulses.
module lcs #(
  parameter int unsigned BITS = counter_pkg::SECTION_BITS
) (
  input  logic            ck,
  input  logic            ci_in,
  input  logic [BITS-1:0] ci,
  input  logic [BITS-1:0] cib,
  input  logic            pall,
  output logic [BITS-1:0] lc,
  output logic            co
);

  logic [BITS-1:0] fire_n;   // active-low toggle requests
  logic [BITS-1:0] fire;
  logic            co_n;

  for (genvar k = 0; k < BITS; k++) begin : g_sel
    assign fire_n[k] = ~(ci_in & (ci[k] | cib[k]));
    stack_inv        u_inv  (.a(fire_n[k]), .y(fire[k]));
    local_clock_gate u_gate (.ck(ck), .en(fire[k]), .gclk(lc[k]));
  end

  assign co_n = ~(ci_in & pall);
  stack_inv u_inv_co (.a(co_n), .y(co));

endmodule
