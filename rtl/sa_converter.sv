// sa_converter: model of the stochastic-to-analogue converter.
//
// The converter in the machine is an analogue R-C low-pass filter (or the
// second-order active filter that replaced it); this module models its
// sampled response in fixed point, so that the rest of the design can be
// simulated and synthesised with it.  Sampled once per master clock, the
// first-order filter obeys v_n = v_(n-1) (1 - K) + A_n K, with A_n = 1 for
// an ON pulse and 0 for OFF, so v settles exponentially to p(A) with time
// constant 1/K clock periods; K = 1/N matches an N-state noise ADDIE.
// Here K = 2^-KSHIFT.  ORDER = 2 cascades two such sections, the critically
// damped (xi = 1) second-order filter whose step response is
// 1 - (1 + Kt) e^(-Kt).
//
// Interface: clk, rst_n, a (stochastic line), v (unsigned fixed point with
// F fraction bits: 2^F stands for 1, i.e. the line always ON).
//
// From the document: the difference equation, K = 1/N and the second-order
// response.  This design's choices: fixed-point arithmetic with K a power
// of two, truncation of v K, two identical first-order sections for the
// second-order filter, and v = 0 on reset.
module sa_converter #(
  parameter int unsigned KSHIFT = 12,
  parameter int unsigned F      = 24,
  parameter int unsigned ORDER  = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a,
  output logic [F:0] v
);
  initial assert (KSHIFT < F && (ORDER == 1 || ORDER == 2))
    else $error("sa_converter: need KSHIFT < F and ORDER 1 or 2");

  localparam logic [F:0] STEP = (F+1)'(1) << (F - KSHIFT);

  logic [F:0] v1, v2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= '0;
      v2 <= '0;
    end else begin
      v1 <= v1 - (v1 >> KSHIFT) + (a ? STEP : '0);
      v2 <= v2 - (v2 >> KSHIFT) + (v1 >> KSHIFT);
    end
  end

  assign v = (ORDER == 2) ? v2 : v1;
endmodule
