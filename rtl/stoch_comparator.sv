// stoch_comparator: digital-to-stochastic interface.
//
// Compares a W-bit binary number nb with a uniformly distributed W-bit
// random number nr and outputs ON when nb > nr.  With nr uniform over
// 0 .. 2^W - 1 the output is ON with probability nb / 2^W, so nb = 0 gives a
// line that is always OFF (E = -V) and nb = 2^(W-1) gives p = 1/2 (E = 0).
// Purely combinational: the output follows the random number, which changes
// once per master clock.
//
// From the document: the comparison "greater than" against a 12-bit random
// number.  The document also says that an all-ones word gives p = 1; with a
// strict comparison it gives p = 4095/4096, which is what this module does.
module stoch_comparator #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] nb,
  input  logic [W-1:0] nr,
  output logic         out
);
  assign out = (nb > nr);
endmodule
