// tb_markov_network: checks the four-state sequential network.
//
// Logic: for every state and all 4096 patterns of the twelve comparator
// lines, the next state must be the one chosen by the state's three lines
// in priority order (S1: C3 -> S4, else C2 -> S3, else C1 -> S2, else stay;
// likewise C4-C6 for S2 -> S1/S3/S4, C7-C9 for S3 -> S1/S2/S4 and C10-C12
// for S4 -> S1/S2/S3), at most one P line may be high, and without step the
// state must not change.  Statistics: with every line ON half the time the
// transition probabilities from each state must be 1/8, 1/8, 1/4, 1/2
// (staying, then the three lines from weakest to strongest).
module tb_markov_network;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic [11:0] c = '0, p;
  logic        step = 1'b0, load = 1'b0;
  logic [1:0]  init = '0, state;

  markov_network dut (.clk, .rst_n, .c, .step, .load, .init, .state, .p);

  // Destinations of the three lines of each state, weakest first.
  function automatic logic [1:0] dest(int s, int k);
    int d [4][3] = '{'{1, 2, 3}, '{0, 2, 3}, '{0, 1, 3}, '{0, 1, 2}};
    return 2'(d[s][k]);
  endfunction

  function automatic logic [1:0] ref_next(int s, logic [11:0] cc);
    if (cc[3*s + 2]) return dest(s, 2);
    if (cc[3*s + 1]) return dest(s, 1);
    if (cc[3*s])     return dest(s, 0);
    return 2'(s);
  endfunction

  initial begin
    int bad, bad_p, bad_hold;
    int cnt [4][4];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(state == 2'd0, "reset state S1");

    bad = 0; bad_p = 0; bad_hold = 0;
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 4096; v++) begin
        init = 2'(s); load = 1'b1; @(negedge clk); load = 1'b0;
        c = 12'(v);
        #1 if ($countones(p) > 1) bad_p++;
        @(negedge clk);
        if (state != 2'(s)) bad_hold++;
        step = 1'b1; @(negedge clk); step = 1'b0;
        if (state != ref_next(s, 12'(v))) bad++;
      end
    chk(bad == 0, $sformatf("next state for all states and patterns (%0d bad)", bad));
    chk(bad_p == 0, $sformatf("at most one transition line high (%0d bad)", bad_p));
    chk(bad_hold == 0, $sformatf("no change without step (%0d bad)", bad_hold));

    // Statistics with every comparator line at probability 1/2.
    foreach (cnt[i, j]) cnt[i][j] = 0;
    step = 1'b1;
    for (int t = 0; t < 200000; t++) begin
      logic [1:0] from;
      from = state;
      c = 12'($urandom);
      @(negedge clk);
      cnt[from][state]++;
    end
    step = 1'b0;
    for (int s = 0; s < 4; s++) begin
      int tot;
      real ps, p0, p1, p2;
      tot = 0;
      for (int j = 0; j < 4; j++) tot += cnt[s][j];
      ps = real'(cnt[s][s]) / tot;
      p0 = real'(cnt[s][dest(s, 0)]) / tot;
      p1 = real'(cnt[s][dest(s, 1)]) / tot;
      p2 = real'(cnt[s][dest(s, 2)]) / tot;
      chk(ps > 0.11 && ps < 0.14 && p0 > 0.11 && p0 < 0.14 && p1 > 0.23 && p1 < 0.27 && p2 > 0.47 && p2 < 0.53,
          $sformatf("S%0d: stay %.3f, %.3f %.3f %.3f", s + 1, ps, p0, p1, p2));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
