// lcg: local clock generator for the lower-order counter bits.
//
// A bit of an up counter toggles when every lower bit is 1; a bit of a down
// counter toggles when every lower bit is 0. A multiplexer per bit therefore
// picks Q (up = 1) or QB (up = 0), and a Manchester-style carry chain ANDs
// those picks from bit 0 upward: stage i passes the carry on when its pick is
// 1 and kills it otherwise. The carry reaching bit i is that bit's toggle
// request; it gates the global clock ck into the local clock lc[i], so only
// the flip-flops that change receive a pulse. The carry leaving the last
// stage is co, the real carry into the first higher-order section.
//
// Interface: ck global clock; up count direction; q / qb the true and
// complemented outputs of the BITS lower-order flip-flops; lc[i] the local
// clock of flip-flop i; co high when all BITS picks are 1 (bits all 1 when
// counting up, all 0 when counting down). Timing: q, qb and up must settle
// while ck is low; lc[i] then follows ck high for that cycle. co is
// combinational from q/qb/up.
//
// Following the design: the Q/QB multiplexers, the carry chain, per-bit local
// clocks, the carry-out Co and LECTOR inverters in this block. This
// implementation's choices: the chain is held as active-low nodes restored by
// the LECTOR inverters, bit 0 (whose carry-in is always asserted) gets a
// local clock like the others, and the pulses are formed by a latch-based
// clock gate.
module lcg #(
  parameter int unsigned BITS = counter_pkg::LCG_BITS
) (
  input  logic            ck,
  input  logic            up,
  input  logic [BITS-1:0] q,
  input  logic [BITS-1:0] qb,
  output logic [BITS-1:0] lc,
  output logic            co
);

  logic [BITS-1:0] pick;      // multiplexer outputs: Q when counting up, QB when down
  logic [BITS:0]   chain_n;   // active-low carry at the input of each stage
  logic [BITS:0]   carry;     // restored carry; carry[i] requests a toggle of bit i

  always_comb begin
    for (int i = 0; i < BITS; i++)
      pick[i] = (counter_pkg::dir_e'(up) == counter_pkg::DIR_UP) ? q[i] : qb[i];
  end

  // Carry-in of the chain is always asserted: bit 0 toggles on every count.
  assign chain_n[0] = 1'b0;

  for (genvar i = 0; i < BITS; i++) begin : g_stage
    // Propagate when the pick is 1, kill (node stays high) otherwise.
    assign chain_n[i+1] = chain_n[i] | ~pick[i];
  end

  for (genvar i = 0; i <= BITS; i++) begin : g_restore
    lector_inv u_inv (.a(chain_n[i]), .y(carry[i]));
  end

  for (genvar i = 0; i < BITS; i++) begin : g_clk
    local_clock_gate u_gate (.ck(ck), .en(carry[i]), .gclk(lc[i]));
  end

  assign co = carry[BITS];

endmodule
