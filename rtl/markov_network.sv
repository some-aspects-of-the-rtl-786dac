// markov_network: sequential network of the four-state Markov chain
// simulator.
//
// The chain state is held in two JK flip-flops, state = {Q2, Q1}, with
// S1 = 00, S2 = 01, S3 = 10 and S4 = 11.  Twelve stochastic lines c[0..11]
// (C1..C12, each ON with a probability set by a comparator word) are turned
// into the transition lines P_ij by "probability transformers" gated by the
// decoded state, so that in state Si at most one P_ij is high:
//   S1: P14 = C3, P13 = C2.~C3, P12 = C1.~C2.~C3
//   S2: P24 = C6, P23 = C5.~C6, P21 = C4.~C5.~C6
//   S3: P34 = C9, P32 = C8.~C9, P31 = C7.~C8.~C9
//   S4: P43 = C12, P42 = C11.~C12, P41 = C10.~C11.~C12
// If none is high the chain stays in its state (P_ii).  The JK inputs are
//   J2 = P13+P14+P23+P24   K2 = P31+P32+P41+P42
//   J1 = P12+P14+P32+P34   K1 = P21+P23+P41+P43
// To obtain transition probabilities P_ij the comparator probabilities
// are set, for S1, to C3 = P14, C2 = P13/(1-P14), C1 = P12/(1-P13-P14),
// and alike for the other states.
//
// Interface: clk, rst_n, c[12], step (one state transition on this clock),
// load/init (load the initial state, takes priority), state, p (the twelve
// P_ij lines in the order P12,P13,P14,P21,P23,P24,P31,P32,P34,P41,P42,P43).
// The state changes on the rising clock edge.
//
// From the document: state assignment, probability transformers, JK
// equations.  This design's choices: synchronous load and step enable in
// place of the gated clock.
module markov_network (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] c,
  input  logic        step,
  input  logic        load,
  input  logic [1:0]  init,
  output logic [1:0]  state,
  output logic [11:0] p
);
  logic [1:0] q;
  logic [3:0] s;    // decoded state S1..S4
  logic p12, p13, p14, p21, p23, p24, p31, p32, p34, p41, p42, p43;
  logic j2, k2, j1, k1;

  assign s = 4'b0001 << q;

  assign p14 = s[0] &  c[2];
  assign p13 = s[0] &  c[1] & ~c[2];
  assign p12 = s[0] &  c[0] & ~c[1] & ~c[2];
  assign p24 = s[1] &  c[5];
  assign p23 = s[1] &  c[4] & ~c[5];
  assign p21 = s[1] &  c[3] & ~c[4] & ~c[5];
  assign p34 = s[2] &  c[8];
  assign p32 = s[2] &  c[7] & ~c[8];
  assign p31 = s[2] &  c[6] & ~c[7] & ~c[8];
  assign p43 = s[3] &  c[11];
  assign p42 = s[3] &  c[10] & ~c[11];
  assign p41 = s[3] &  c[9] & ~c[10] & ~c[11];

  assign j2 = p13 | p14 | p23 | p24;
  assign k2 = p31 | p32 | p41 | p42;
  assign j1 = p12 | p14 | p32 | p34;
  assign k1 = p21 | p23 | p41 | p43;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= 2'b00;
    else if (load) q <= init;
    else if (step) begin
      q[1] <= (j2 & ~q[1]) | (~k2 & q[1]);
      q[0] <= (j1 & ~q[0]) | (~k1 & q[0]);
    end
  end

  assign state = q;
  assign p = {p43, p42, p41, p34, p32, p31, p24, p23, p21, p14, p13, p12};
endmodule
