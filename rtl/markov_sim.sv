// markov_sim: four-state Markov chain simulator.
//
// Estimates the state occupation probabilities of a four-state chain after
// n transitions.  Each run starts from the state held in the initial-state
// memory (two flip-flops set from the front panel), makes n transitions
// through the sequential network (markov_network) clocked by the
// programmable pulse generator (pulse_gen), and then the final state,
// decoded to one of four lines, is sampled into four flip-flops.  Runs are
// started manually or automatically by a divide-by-PERIOD counter on the
// master clock, so each sample line carries a stochastic sequence, one bit
// per run, that is ON with the probability of being in that state after n
// transitions; converters on these lines display the distribution.
// In continuous mode the network steps on every clock and the sample lines
// follow the present state.
//
// Interface: clk, rst_n, c[12] (comparator lines, see markov_network),
// init/set_init (initial-state switches and their load strobe), n_set
// (BCD), auto_run, start, cont, state, sample[4] (S1..S4), run_done
// (strobe when a new sample has been taken), busy.
//
// Timing: a run of n transitions takes n + 2 clocks from start to the
// sample update; PERIOD must exceed n + 2 for automatic runs.
//
// From the document: the initial-state memory reloaded at each start, the
// divide-by-10^4 run clock, the pulse generator, the sampling of the final
// state into four flip-flops.  This design's choices: the synchronous
// strobes and the continuous-mode sampling.
module markov_sim #(
  parameter int unsigned DIGITS = 4,
  parameter int unsigned PERIOD = 10000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [11:0]         c,
  input  logic [1:0]          init,
  input  logic                set_init,
  input  logic [4*DIGITS-1:0] n_set,
  input  logic                auto_run,
  input  logic                start,
  input  logic                cont,
  output logic [1:0]          state,
  output logic [3:0]          sample,
  output logic                run_done,
  output logic                busy
);
  logic [1:0]                  init_q;
  logic [$clog2(PERIOD+1)-1:0] div_q;
  logic                        tick, go, en, done;
  logic [3:0]                  sample_q;
  logic [11:0]                 p_unused;
  logic [4*DIGITS-1:0]         cnt_unused;

  // Initial-state memory.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        init_q <= 2'b00;
    else if (set_init) init_q <= init;
  end

  // Divide-by-PERIOD automatic start.
  assign tick = auto_run && (div_q == $bits(div_q)'(PERIOD - 1));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  div_q <= '0;
    else if (!auto_run || tick)  div_q <= '0;
    else                         div_q <= div_q + 1'b1;
  end

  assign go = start | tick;

  pulse_gen #(.DIGITS(DIGITS)) u_pg (
    .clk, .rst_n, .start(go), .n_set, .cont, .en, .busy, .done, .count(cnt_unused)
  );

  markov_network u_net (
    .clk, .rst_n, .c, .step(en & ~go), .load(go), .init(init_q), .state, .p(p_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            sample_q <= 4'b0000;
    else if (done || cont) sample_q <= 4'b0001 << state;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) run_done <= 1'b0;
    else        run_done <= done;
  end

  assign sample = sample_q;
endmodule
