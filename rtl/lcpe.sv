// lcpe: local clock pre-evaluator for one higher-order counter section.
//
// Waiting for the carry to ripple up from the lower-order bits is slow, so
// this block works out in advance, from the section's own bits only, which of
// them would toggle if the carry arrived. For section bit k it evaluates two
// conditions:
//   ci[k]  = up   AND q[0..k-1]  all 1  (bit k toggles on an up count)
//   cib[k] = !up  AND qb[0..k-1] all 1  (bit k toggles on a down count)
// For k = 0 the AND over no bits is 1. It also gives pall, the same condition
// over all BITS bits, which the selector uses to pass the carry on to a
// further section.
//
// Each condition is formed as an active-low node, as a precharged node of
// the dynamic circuit is, and restored by a stacking inverter.
//
// Interface: up count direction; q / qb true and complemented outputs of the
// section's flip-flops; ci / cib the pre-evaluated carries; pall the
// section-wide propagate. Combinational: the outputs follow q, qb and up
// within the same clock-low phase, well ahead of the real carry.
//
// Following the design: the block's place and purpose, its inputs UP, Q and
// QB and its outputs CI0-CI3 and CIB0-CIB3, and the stacking inverters.
// This implementation's choices: CI as the up-count and CIB as the
// down-count condition, the pall output, and modelling the
// precharge / evaluate circuit by the value it evaluates to.
module lcpe #(
  parameter int unsigned BITS = counter_pkg::SECTION_BITS
) (
  input  logic            up,
  input  logic [BITS-1:0] q,
  input  logic [BITS-1:0] qb,
  output logic [BITS-1:0] ci,
  output logic [BITS-1:0] cib,
  output logic            pall
);

  logic [BITS:0] all_q;    // all_q[k]:  q[0..k-1] all 1
  logic [BITS:0] all_qb;   // all_qb[k]: qb[0..k-1] all 1
  logic [BITS:0] dyn_ci_n; // evaluated dynamic nodes, active low
  logic [BITS:0] dyn_cib_n;
  logic [BITS:0] ci_full;
  logic [BITS:0] cib_full;

  assign all_q[0]  = 1'b1;
  assign all_qb[0] = 1'b1;

  for (genvar k = 0; k < BITS; k++) begin : g_and
    assign all_q[k+1]  = all_q[k]  & q[k];
    assign all_qb[k+1] = all_qb[k] & qb[k];
  end

  for (genvar k = 0; k <= BITS; k++) begin : g_eval
    // Node discharges (goes low) when the whole NMOS stack conducts.
    assign dyn_ci_n[k]  = ~( up & all_q[k]);
    assign dyn_cib_n[k] = ~(~up & all_qb[k]);
    stack_inv u_inv_ci  (.a(dyn_ci_n[k]),  .y(ci_full[k]));
    stack_inv u_inv_cib (.a(dyn_cib_n[k]), .y(cib_full[k]));
  end

  assign ci   = ci_full[BITS-1:0];
  assign cib  = cib_full[BITS-1:0];
  assign pall = ci_full[BITS] | cib_full[BITS];

endmodule
