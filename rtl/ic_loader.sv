// ic_loader: initial-conditions facility for the integrators.
//
// Stores NWORDS W-bit initial-condition words and, at the start of each
// run, sets each integrator to its word by letting it count up from zero.
//
// WRITE (w high when the master clear cm arrives): the supervising
// computer shifts each word, MSB first, into a W-bit serial-in register
// with one cc strobe per bit; a divide-by-W counter then moves the
// assembled word into the word memory, a NWORDS-word shift register that
// takes new words while w is high and recirculates while w is low (the two
// 6 x 40-bit MOS shift registers of the document).  After NWORDS words the
// first word written is at the output stage.
//
// READ (w low when cm arrives): cm also clears all integrators.  The
// count-up line goes high, forcing every integrator's inputs ON; the HOLD
// register holds every integrator except the one in position 1; a dummy
// counter, cleared with the integrators, counts with them.  When the dummy
// counter exceeds the word at the memory output (one state past the word),
// the memory advances to the next word, the HOLD register moves its single
// low bit on to the next position and the dummy counter clears.  During
// that clock every hold line is high, so the integrator stops one state
// past its word.  An empty position (word 0) takes two clocks.  When the
// low bit reaches the extra last stage of the HOLD register, every hold
// line goes low, count_up drops and the integrators run.  A position with
// word w takes w + 2 master clocks.
//
// Interface: clk (master clock), rst_n, cc (computer clock strobe), din
// (serial data), w (write line), cm (master clear strobe), count_up, hold
// (bit i = hold line of position i+1), busy (READ in progress), mem_out
// (word at the memory output).
//
// From the document: the WRITE/READ modes chosen by w at the clear pulse,
// the W-bit serial register and divide-by-12 counter, the 40-word
// recirculating memory, the dummy counter, the comparison "greater than",
// the HOLD register with its low bit walking from position 1 to 40 and the
// release of all integrators when it reaches Q40.  This design's choices:
// synchronous strobes in place of the separate computer clock, the gating
// of the hold lines during the advancing clock, and a dummy counter one
// bit wider than W so that the all-ones word also terminates.
module ic_loader #(
  parameter int unsigned W      = 12,
  parameter int unsigned NWORDS = 40
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cc,
  input  logic              din,
  input  logic              w,
  input  logic              cm,
  output logic              count_up,
  output logic [NWORDS-1:0] hold,
  output logic              busy,
  output logic [W-1:0]      mem_out
);
  logic [W-1:0]          sr_q;
  logic [$clog2(W)-1:0]  div_q;
  logic [W-1:0]          mem_q [NWORDS];
  logic                  ff1_q;
  logic [NWORDS:0]       hold_q;      // [NWORDS] is the extra stage Q40
  logic [W:0]            dummy_q;
  logic                  fire, done, c12;
  logic [W-1:0]          sr_next;

  assign sr_next = {sr_q[W-2:0], din};
  assign c12     = cc && !ff1_q && (div_q == $bits(div_q)'(W - 1));
  assign mem_out = mem_q[NWORDS-1];
  assign fire    = ff1_q && (dummy_q > {1'b0, mem_out});
  assign done    = ff1_q && !hold_q[NWORDS];

  // Serial input register and divide-by-W counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q  <= '0;
      div_q <= '0;
    end else if (cm) begin
      div_q <= '0;
    end else if (cc && !ff1_q) begin
      sr_q  <= sr_next;
      div_q <= c12 ? '0 : div_q + 1'b1;
    end
  end

  // Word memory: loads on C12 in WRITE mode, recirculates on fire in READ.
  always_ff @(posedge clk) begin
    if (c12 || fire) begin
      for (int i = NWORDS - 1; i > 0; i--) mem_q[i] <= mem_q[i-1];
      mem_q[0] <= (w && c12) ? sr_next : mem_q[NWORDS-1];
    end
  end

  // FF1 (count-up line), HOLD register and dummy counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff1_q   <= 1'b0;
      hold_q  <= '0;
      dummy_q <= '0;
    end else if (cm) begin
      ff1_q   <= !w;
      hold_q  <= w ? '0 : {{NWORDS{1'b1}}, 1'b0};
      dummy_q <= '0;
    end else if (done) begin
      ff1_q   <= 1'b0;
      hold_q  <= '0;
      dummy_q <= '0;
    end else if (fire) begin
      hold_q  <= {hold_q[NWORDS-1:0], 1'b1};
      dummy_q <= '0;
    end else if (ff1_q) begin
      dummy_q <= dummy_q + 1'b1;
    end
  end

  assign count_up = ff1_q;
  assign busy     = ff1_q;
  assign hold     = hold_q[NWORDS-1:0] | {NWORDS{fire}};
endmodule
