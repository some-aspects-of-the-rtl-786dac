// stoch_multiplier: stochastic multiplication, E* = E1 E2 / V.
//
// For independent single-line bipolar inputs the exclusive-NOR of the two
// lines is ON with probability p1 p2 + (1-p1)(1-p2), which represents the
// normalised product.  Combinational.  Follows the document exactly.
module stoch_multiplier (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = ~(a ^ b);
endmodule
