// cg_updown_counter: clock-gated synchronous up/down counter.
//
// Instead of clocking every flip-flop on every cycle, the counter clocks only
// the bits that change. Each bit is a toggle flip-flop, so "clock it" and
// "flip it" are the same thing. The lower LCG_BITS bits are served by the
// local clock generator (lcg), which runs a short carry chain over them. Each
// higher-order section of SECTION_BITS bits has a pre-evaluator (lcpe) that
// works out from the section's own bits which of them would flip, and a
// selector (lcs) that releases those clocks once the real carry from below
// arrives. The selector's carry out feeds the next section; the last one is
// brought out as co.
//
// With up = 1 the count goes 0, 1, 2, ...; with up = 0 it goes down, wrapping
// in both directions. The direction may change on any cycle.
//
// Interface: ck global clock; rst_n asynchronous active-low reset to 0; up
// count direction; q the count (bit 0 least significant); lclk the local
// clock of each bit, brought out to observe the gating; co high while the
// count is at its last value in the current direction (all ones counting up,
// all zeros counting down). Timing: up must settle while ck is low; q takes
// its new value after each rising edge of ck, one step per cycle.
//
// Following the design: the partition into LCG (bits 0-3) and LCPE + LCS
// (bits 4-7), the 8-bit default width, toggle flip-flops with Q/QB and the UP
// control. This implementation's choices: the reset, the co and lclk ports,
// and chaining further higher-order sections through HI_SECTIONS.
module cg_updown_counter #(
  parameter  int unsigned LCG_BITS     = counter_pkg::LCG_BITS,
  parameter  int unsigned SECTION_BITS = counter_pkg::SECTION_BITS,
  parameter  int unsigned HI_SECTIONS  = counter_pkg::HI_SECTIONS,
  localparam int unsigned WIDTH        = LCG_BITS + SECTION_BITS * HI_SECTIONS
) (
  input  logic             ck,
  input  logic             rst_n,
  input  logic             up,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] lclk,
  output logic             co
);

  logic [WIDTH-1:0]     qb;
  logic [HI_SECTIONS:0] carry;   // carry[s]: real carry into higher section s

  // Storage: one toggle flip-flop per bit, each on its own local clock.
  for (genvar i = 0; i < WIDTH; i++) begin : g_ff
    tff u_ff (.lclk(lclk[i]), .rst_n(rst_n), .q(q[i]), .qb(qb[i]));
  end

  // Lower-order bits.
  lcg #(.BITS(LCG_BITS)) u_lcg (
    .ck (ck),
    .up (up),
    .q  (q [LCG_BITS-1:0]),
    .qb (qb[LCG_BITS-1:0]),
    .lc (lclk[LCG_BITS-1:0]),
    .co (carry[0])
  );

  // Higher-order sections.
  for (genvar s = 0; s < HI_SECTIONS; s++) begin : g_sec
    localparam int unsigned LO = LCG_BITS + s * SECTION_BITS;

    logic [SECTION_BITS-1:0] ci;
    logic [SECTION_BITS-1:0] cib;
    logic                    pall;

    lcpe #(.BITS(SECTION_BITS)) u_lcpe (
      .up   (up),
      .q    (q [LO +: SECTION_BITS]),
      .qb   (qb[LO +: SECTION_BITS]),
      .ci   (ci),
      .cib  (cib),
      .pall (pall)
    );

    lcs #(.BITS(SECTION_BITS)) u_lcs (
      .ck    (ck),
      .ci_in (carry[s]),
      .ci    (ci),
      .cib   (cib),
      .pall  (pall),
      .lc    (lclk[LO +: SECTION_BITS]),
      .co    (carry[s+1])
    );
  end

  assign co = carry[HI_SECTIONS];

endmodule
