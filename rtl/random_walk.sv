// random_walk: one-dimensional random walk simulator.
//
// The walker's position is a DIGITS-decade BCD up/down counter (10,000
// states for four digits).  On each step the counter moves up with
// probability P_U, down otherwise, unless it holds, which it does with
// probability P_H.  Both probabilities come from stochastic comparators:
// P_U = pu_word / 2^W against one random number, P_H = ph_word / 2^W
// against another.  The start position k is loaded in parallel.  At a
// boundary (9...9 moving up, 0...0 moving down) the Max/Min detector holds
// the counter; if that boundary is switched to absorbing, the walk is
// latched there (absorbed) and stops until the next load, otherwise it is
// reflected (the attempted step is lost).  The most significant bit of the
// top digit tells which boundary has been reached.
//
// Interface: clk, rst_n, step (one step on this clock), pu_word, ph_word,
// noise_u, noise_h (W-bit random numbers), k (packed BCD), load,
// abs_hi/abs_lo (boundary absorbing when high), state, absorbed, at_bound
// (the Max/Min line), up (P_U line), hold (P_H line).
//
// From the document: BCD decade counter with up/down control, the two
// comparators, parallel load, Max/Min detection, the absorb/reflect
// switches and the use of the top digit's MSB.  This design's choices:
// the clock enable, absorption on the attempt to step past the boundary
// whatever the hold line, and the ABSORB_ON_ENTRY option, which absorbs
// on entering the boundary state as the document's analysis and
// experiments (boundaries at 0 and a) assume.
module random_walk #(
  parameter int unsigned DIGITS = 4,
  parameter int unsigned W      = 12,
  parameter bit          ABSORB_ON_ENTRY = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                step,
  input  logic [W-1:0]        pu_word,
  input  logic [W-1:0]        ph_word,
  input  logic [W-1:0]        noise_u,
  input  logic [W-1:0]        noise_h,
  input  logic [4*DIGITS-1:0] k,
  input  logic                load,
  input  logic                abs_hi,
  input  logic                abs_lo,
  output logic [4*DIGITS-1:0] state,
  output logic                absorbed,
  output logic                at_bound,
  output logic                up,
  output logic                hold
);
  initial assert (DIGITS >= 1 && DIGITS <= 4) else $error("random_walk: 1 to 4 digits");

  localparam logic [4*DIGITS-1:0] ALL9 = {DIGITS{4'h9}};

  logic [4*DIGITS-1:0] st_q;
  logic [4*DIGITS-1:0] st_next;
  logic                abs_q, ph, msb, absorb, absorb_try, absorb_enter;

  stoch_comparator #(.W(W)) u_pu (.nb(pu_word), .nr(noise_u), .out(up));
  stoch_comparator #(.W(W)) u_ph (.nb(ph_word), .nr(noise_h), .out(ph));

  assign at_bound = up ? (st_q == ALL9) : (st_q == '0);
  assign hold     = ph | at_bound | abs_q;
  assign msb      = st_q[4*DIGITS-1];
  assign st_next  = (4*DIGITS)'(disco_pkg::bcd_step(16'(st_q), DIGITS, up));

  // Absorption as the circuit does it: on the Max/Min signal, that is on
  // an attempt to step past the boundary.  Or, with ABSORB_ON_ENTRY, on
  // the step that enters an absorbing boundary state.
  assign absorb_try   = step && at_bound && !abs_q && ((msb && abs_hi) || (!msb && abs_lo));
  assign absorb_enter = step && !hold && ((st_next == ALL9 && abs_hi) || (st_next == '0 && abs_lo));
  assign absorb       = ABSORB_ON_ENTRY ? absorb_enter : absorb_try;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= '0;
      abs_q <= 1'b0;
    end else if (load) begin
      st_q  <= k;
      abs_q <= 1'b0;
    end else if (step) begin
      if (absorb) abs_q <= 1'b1;
      if (!hold)  st_q  <= st_next;
    end
  end

  assign state    = st_q;
  assign absorbed = abs_q;
endmodule
