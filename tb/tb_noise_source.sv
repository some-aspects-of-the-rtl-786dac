// tb_noise_source: checks the m-sequence noise generator.
//
// A 7-stage instance must repeat with period exactly 2^7 - 1 = 127 clocks
// and visit every non-zero state once per period.  On the default 63-stage
// instance: the reset state is the seed, each stage takes the previous
// stage's value one clock later, every word bit obeys the register's own
// recurrence (so it is the m-sequence at some delay), each line and word
// bit is ON close to half the time, word bits of different words agree
// only about half the time, and a word is not a shifted copy of its value
// one clock earlier, nor of another word's.
module tb_noise_source;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic [6:0]  l7;
  logic [3:0]  w7 [1];
  noise_source #(.N(7), .W(4), .NWORDS(1)) u7 (.clk, .rst_n, .lines(l7), .words(w7));

  logic [62:0] l63;
  logic [11:0] w63 [4];
  noise_source u63 (.clk, .rst_n, .lines(l63), .words(w63));

  initial begin
    bit seen [128];
    logic [6:0] first;
    logic [62:0] prev;
    int ones_line, ones_w0, same01, n, period, bad_rec, bad_shift, distinct, self_shift, cross_lag;
    logic [11:0] hist [4][64];

    repeat (3) @(posedge clk);
    chk(l63 == 63'(64'h9E37_79B9_7F4A_7C15), "reset state is the seed");
    chk(l7 == 7'h15, "7-stage reset state");
    @(negedge clk) rst_n = 1'b1;

    // Period of the 7-stage register.
    @(negedge clk);
    first  = l7;
    period = 0;
    foreach (seen[i]) seen[i] = 1'b0;
    do begin
      seen[l7] = 1'b1;
      @(negedge clk);
      period++;
    end while (l7 != first && period < 1000);
    chk(period == 127, $sformatf("7-stage period %0d, expected 127", period));
    distinct = 0;
    foreach (seen[i]) if (seen[i]) distinct++;
    chk(distinct == 127 && !seen[0], $sformatf("7-stage distinct states %0d", distinct));

    // 63-stage register statistics.
    ones_line = 0; ones_w0 = 0; same01 = 0; bad_rec = 0; bad_shift = 0; self_shift = 0; cross_lag = 0;
    n = 200_000;
    prev = l63;
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      if (l63[62:1] != prev[61:0]) bad_shift++;
      // Stage 1 takes stage 63 XOR stage 62, so any XOR of stages obeys
      // x(t) = x(t-63) ^ x(t-62).
      for (int w = 0; w < 4; w++) begin
        if (t >= 63 && w63[w] != (hist[w][(t - 63) % 64] ^ hist[w][(t - 62) % 64])) bad_rec++;
        hist[w][t % 64] = w63[w];
      end
      if (t >= 1) begin
        if (w63[0][11:1] == hist[0][(t - 1) % 64][10:0]) self_shift++;
        if (w63[1] == hist[0][(t - 1) % 64]) cross_lag++;
      end
      ones_line += l63[30];
      ones_w0   += w63[0][5];
      same01    += (w63[0][3] == w63[1][3]);
      prev = l63;
    end
    chk(bad_shift == 0, $sformatf("stages shift by one each clock (%0d bad)", bad_shift));
    chk(bad_rec == 0, $sformatf("word bits follow the m-sequence recurrence (%0d bad)", bad_rec));
    chk(self_shift < n / 500, $sformatf("word 0 is a shifted copy of itself %0d/%0d times", self_shift, n));
    chk(cross_lag < n / 1000, $sformatf("word 1 repeats word 0 a clock later %0d/%0d times", cross_lag, n));
    chk(ones_line > n*0.49 && ones_line < n*0.51, $sformatf("line ON fraction %0d/%0d", ones_line, n));
    chk(ones_w0 > n*0.49 && ones_w0 < n*0.51, $sformatf("word bit ON fraction %0d/%0d", ones_w0, n));
    chk(same01 > n*0.49 && same01 < n*0.51, $sformatf("words 0 and 1 agree %0d/%0d", same01, n));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
