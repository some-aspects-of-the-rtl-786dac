// stoch_integrator: summing stochastic integrator with programmable scale.
//
// A W-bit up/down counter integrates E1 + E2: on each master clock it counts
// up when both inputs are ON, down when both are OFF, and holds when they
// differ (direction = E1, enable = E1 XNOR E2), giving
// E*(t) = E*(0) + 1/(N tau) * integral (E1 + E2) dt with N = 2^length.
// The counter is compared with a random number to give the stochastic
// output; the counter itself is the digital output.
//
// Scaling: a 4-bit scale code {X1,X2,X3,X4} selects a counter length of
// 12, 11, 10, 9 or 8 bits (codes 1111, 0111, 1011, 1101, 1110), i.e. scale
// factors 1, 2, 4, 8, 16.  A shortened counter counts in steps of
// 2^(frozen bits) and leaves the frozen low bits alone.  The code sits in a
// 4-bit serial register shifted by scale_shift (scale_in enters as X4 and
// moves towards X1; scale_out is X1), so the registers of all integrators
// form one chain.
//
// Initial conditions: count_up (the "count up" line of the loader) forces
// both inputs ON, and hold stops the counter, so the initial-condition
// loader can let exactly one integrator count up at a time.  clear (the
// master clear) zeroes the counter.
//
// Timing: count, out and scale_out change on the rising clock edge after
// the inputs; out is combinational in the counter and noise.
//
// From the document: the XNOR/AND input gating, the counter, the
// comparator, the 12..8-bit scaling code, the serial scale pins, the HOLD
// line and the count-up OR gates.  This design's choices: the counter
// saturates at 0 and 2^W - 1 instead of wrapping; hold is active high
// (a high hold line stops the counter, as the initial-condition text
// requires); the scale code resets to 1111; clear and scale_shift are
// synchronous one-clock strobes.
module stoch_integrator #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         e1,
  input  logic         e2,
  input  logic         hold,
  input  logic         count_up,
  input  logic [W-1:0] noise,
  input  logic         scale_shift,
  input  logic         scale_in,
  output logic         scale_out,
  output logic [W-1:0] count,
  output logic         out
);
  logic [3:0]   scale_q;   // {X1, X2, X3, X4}
  logic [W-1:0] cnt_q;
  logic         a, b, en, up;
  logic [W-1:0] step;
  int unsigned  skip;

  assign a    = e1 | count_up;
  assign b    = e2 | count_up;
  assign up   = a;
  assign en   = ~(a ^ b) & ~hold;
  assign skip = disco_pkg::scale_skip(scale_q);
  assign step = W'(1) << skip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           scale_q <= 4'b1111;
    else if (scale_shift) scale_q <= {scale_q[2:0], scale_in};
  end
  assign scale_out = scale_q[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cnt_q <= '0;
    else if (clear)  cnt_q <= '0;
    else if (en) begin
      if (up) begin
        if (cnt_q <= '1 - step) cnt_q <= cnt_q + step;
      end else begin
        if (cnt_q >= step)      cnt_q <= cnt_q - step;
      end
    end
  end

  assign count = cnt_q;

  stoch_comparator #(.W(W)) u_cmp (.nb(cnt_q), .nr(noise), .out(out));
endmodule
