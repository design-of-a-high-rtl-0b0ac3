// tff: toggle flip-flop, one bit of the counter.
//
// The bit inverts on every rising edge of its local clock and holds its value
// when no local clock pulse arrives, so the counter needs no next-state logic:
// deciding whether a bit changes is done entirely by gating its clock. Q and
// its complement QB are both brought out because the clock-generation logic
// selects between them for up and down counting.
//
// Interface: lclk is the bit's local (gated) clock, rst_n an asynchronous
// active-low reset that clears the bit. Timing: q changes right after the
// rising edge of lclk.
//
// The toggle behaviour and the Q/QB outputs follow the design; it is built
// there as a compact 16-transistor cell with keeper devices, which in RTL is
// simply a flip-flop. The reset is this implementation's addition: the design
// shows none, but a simulation and a real chip need a known start state.
module tff (
  input  logic lclk,
  input  logic rst_n,
  output logic q,
  output logic qb
);

  always_ff @(posedge lclk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= ~q;
  end

  assign qb = ~q;

endmodule
