// lector_inv: inverter built in the LECTOR (leakage control transistor) style.
//
// The cell stacks two leakage-control transistors with the usual switching
// pair: PM0 and PM1 in series in the pull-up, NM0 and NM1 in series in the
// pull-down, each 45 nm long, the PMOS 240 nm and the NMOS 120 nm wide. The
// leakage-control devices take their gates from the internal node of the
// opposite network, so in either output state one of them sits near cut-off
// and the standby current between supply and ground drops. That saving is a
// transistor property and has no counterpart in RTL; what RTL can express,
// and what this module gives, is the logic function: y is the complement of a.
//
// Interface: a (in), y (out). Purely combinational, no clock.
// It is used for the carry-chain output stages of the local clock generator,
// where the LECTOR style is applied in the design; the placement inside that
// generator is this implementation's choice.
module lector_inv (
  input  logic a,
  output logic y
);

  // Pull-up conducts (PM0 and PM1 both on) only for a == 0; pull-down
  // conducts (NM0 and NM1 both on) only for a == 1.
  logic pull_up_on;
  logic pull_down_on;

  assign pull_up_on   = ~a;
  assign pull_down_on =  a;

  // Exactly one network conducts for either input level.
  assign y = pull_up_on & ~pull_down_on;

endmodule
