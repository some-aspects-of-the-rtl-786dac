// noise_source: m-sequence digital noise generator.
//
// An N-stage shift register whose first stage is loaded with the XOR of
// stage N and stage TAP cycles through all 2^N - 1 non-zero states, so each
// stage carries the same maximal-length sequence, one clock later than the
// stage before it.  The stages are brought out as noise lines, each ON with
// probability 1/2.  As the document notes, an XOR of stages of such a
// register is the same m-sequence at another delay; this module uses that
// to build NWORDS random W-bit numbers.  Each bit of each word is the XOR
// of three stages, P, P+D1 and P+D2, and no two bits share the spacing
// pair (D1, D2).  A bit is therefore never a time-shifted copy of another
// bit, so a word is not a shifted copy of its own earlier values, as it
// would be if its bits were adjacent stages, and words used side by side
// (the comparators of the Markov chain simulator) do not follow one
// another.
//
// Interface: clk, rst_n (asynchronous, loads SEED), lines (the N stages,
// bit 0 = stage 1), words (NWORDS x W bits).  Everything changes once per
// clock.
//
// From the document: the shift register with XOR feedback and the use of
// delayed copies of one m-sequence as independent noise.  This design's
// choices: the register length and taps (the document gives neither), the
// choice of stages for each word bit and the seed.
module noise_source #(
  parameter int unsigned N      = 63,
  parameter int unsigned W      = 12,
  parameter int unsigned NWORDS = 4,
  parameter logic [N-1:0] SEED  = N'(64'h9E37_79B9_7F4A_7C15)
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [N-1:0]        lines,
  output logic [W-1:0]        words [NWORDS]
);
  localparam int unsigned TAP = disco_pkg::lfsr_tap(N);

  initial begin
    assert (TAP != 0) else $error("noise_source: no taps known for N=%0d", N);
    assert (SEED != '0) else $error("noise_source: seed must be non-zero");
  end

  logic [N-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= SEED;
    else        sr <= {sr[N-2:0], sr[N-1] ^ sr[TAP-1]};
  end

  assign lines = sr;

  // Number of spacing pairs 1 <= D1 < D2 <= N-1, and a stride coprime with
  // it that spreads consecutive bits over the pairs.
  localparam int unsigned NPAIRS = (N - 1) * (N - 2) / 2;

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    while (b != 0) begin
      int unsigned t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic int unsigned pick_stride(int unsigned m);
    int unsigned s = 37;
    while (gcd(s, m) != 1) s++;
    return s;
  endfunction

  localparam int unsigned STRIDE = pick_stride(NPAIRS);

  // Spacing pair number idx, counting (1,2), (1,3) .. (1,N-1), (2,3) ..
  function automatic int unsigned pair_d(int unsigned idx, bit second);
    int unsigned i = idx;
    for (int unsigned d1 = 1; d1 < N - 1; d1++) begin
      if (i < N - 1 - d1) return second ? d1 + 1 + i : d1;
      i -= N - 1 - d1;
    end
    return 0;
  endfunction

  initial
    assert (NWORDS * W <= NPAIRS) else $error("noise_source: N too short for %0d words", NWORDS);

  for (genvar w = 0; w < int'(NWORDS); w++) begin : g_word
    for (genvar b = 0; b < int'(W); b++) begin : g_bit
      localparam int unsigned K   = w * W + b;
      localparam int unsigned IDX = (K * STRIDE) % NPAIRS;
      localparam int unsigned D1  = pair_d(IDX, 1'b0);
      localparam int unsigned D2  = pair_d(IDX, 1'b1);
      localparam int unsigned P   = (K * 13) % (N - D2);
      assign words[w][b] = sr[P] ^ sr[P + D1] ^ sr[P + D2];
    end
  end
endmodule
