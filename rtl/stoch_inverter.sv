// stoch_inverter: stochastic negation, E* = -E.
//
// In single-line bipolar coding p(B) = 1 - p(A) represents -E, so the
// element is a NOT gate.  Combinational.  Follows the document exactly.
module stoch_inverter (
  input  logic a,
  output logic y
);
  assign y = ~a;
endmodule
