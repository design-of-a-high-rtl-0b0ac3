// stack_inv: stacking inverter.
//
// One PMOS (PM0, 240 nm / 45 nm) pulls up and two series NMOS (NM1 over NM0,
// 120 nm / 45 nm each) pull down, both NMOS gates driven by the input. With
// the input low, two OFF transistors in series raise the source voltage of
// the upper one and cut the sub-threshold leakage. Like the LECTOR cell this
// is a leakage measure that RTL cannot express; the module carries the logic
// function only: y is the complement of a.
//
// Interface: a (in), y (out). Purely combinational, no clock.
// It is used as the output stage of the dynamic nodes in the local clock
// pre-evaluator and the local clock selector, which is where the design
// applies the stacking technique; the exact nodes are this implementation's
// choice.
module stack_inv (
  input  logic a,
  output logic y
);

  // The stacked pull-down conducts only when both NM1 and NM0 are on.
  logic nm1_on;
  logic nm0_on;

  assign nm1_on = a;
  assign nm0_on = a;

  assign y = ~(nm1_on & nm0_on);

endmodule
