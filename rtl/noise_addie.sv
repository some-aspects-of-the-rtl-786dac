// noise_addie: stochastic-to-digital converter (noise ADDIE).
//
// An integrator with 100% negative feedback: its first input is the
// sequence A to be converted and its second input is F, the inverse of the
// integrator's own stochastic output.  The counter moves up when A and F
// are both ON and down when both are OFF, so its expected change is
// p(A) - C(t) and C(t) settles exponentially to p(A) with a time constant
// of N = 2^W clock periods (eq. 5.3); the W-bit count is the converted
// value.  count and out change on the rising clock edge; clear (master
// clear) zeroes the counter.
//
// From the document: the structure of Fig. 5.1 built from the integrator.
// This design's choices: the ADDIE always uses the full 12-bit counter (its
// scale register is not chained) and has no hold line.
module noise_addie #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         a,
  input  logic [W-1:0] noise,
  output logic [W-1:0] count,
  output logic         out
);
  logic f;
  logic unused_scale;

  assign f = ~out;

  stoch_integrator #(.W(W)) u_int (
    .clk, .rst_n, .clear,
    .e1(a), .e2(f), .hold(1'b0), .count_up(1'b0), .noise,
    .scale_shift(1'b0), .scale_in(1'b1), .scale_out(unused_scale),
    .count, .out
  );
endmodule
