// stoch_summer: normalised stochastic addition, E* = (E1 + E2) / 2.
//
// An m-sequence line m (ON with probability 1/2) enables gate A (E1 AND m)
// or gate B (E2 AND NOT m), never both, and an OR gate combines them, so the
// output is E1 half the time and E2 the other half.  Combinational.
// Follows the document exactly.
module stoch_summer (
  input  logic a,
  input  logic b,
  input  logic m,
  output logic y
);
  logic ga, gb;
  assign ga = a & m;
  assign gb = b & ~m;
  assign y  = ga | gb;
endmodule
