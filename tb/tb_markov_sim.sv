// tb_markov_sim: checks the Markov chain simulator.
//
// Deterministic chain (C3, C12 and C7 held ON: S1 -> S4 -> S3 -> S1):
// from S1, runs of n = 1..7 transitions must sample S4, S3, S1, S4, ...
// with the sample taken n + 2 clocks after start; the initial-state memory
// must be reloaded at every start; automatic runs must come every PERIOD
// clocks.  Random chain (all twelve lines ON half the time, from $urandom):
// after one transition from S1 the sample lines must be ON with
// probabilities 1/8, 1/8, 1/4, 1/2, and after two transitions with the
// two-step probabilities 0.125, 0.219, 0.344, 0.313 (squared matrix).
module tb_markov_sim;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  localparam int PERIOD = 40;

  logic [11:0] c = '0;
  logic [1:0]  init = '0, state;
  logic        set_init = 0, auto_run = 0, start = 0, cont = 0, run_done, busy;
  logic [15:0] n_set = 16'h0001;
  logic [3:0]  sample;
  logic        rnd = 1'b0;

  markov_sim #(.PERIOD(PERIOD)) dut (.clk, .rst_n, .c, .init, .set_init, .n_set, .auto_run,
                                     .start, .cont, .state, .sample, .run_done, .busy);

  always @(negedge clk) if (rnd) c <= 12'($urandom);

  initial begin
    int t, last, gaps_ok, runs;
    int on [4];
    logic [3:0] expect_s [3] = '{4'b1000, 4'b0100, 4'b0001};   // S4, S3, S1
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    init = 2'd0; set_init = 1'b1; @(negedge clk); set_init = 1'b0;
    c = 12'b1000_0100_0100;   // C12, C7, C3
    for (int n = 1; n <= 7; n++) begin
      n_set = 16'(n);
      start = 1'b1; @(negedge clk); start = 1'b0;
      t = 1;
      while (!run_done && t < 100) begin @(negedge clk); t++; end
      chk(t == n + 2, $sformatf("n=%0d: sample after %0d clocks, expected %0d", n, t, n + 2));
      chk(sample == expect_s[(n - 1) % 3], $sformatf("n=%0d: sample %b", n, sample));
    end

    // Initial-state memory: start from S3 (S3 -> S1 -> S4).
    init = 2'd2; set_init = 1'b1; @(negedge clk); set_init = 1'b0;
    n_set = 16'h0002;
    start = 1'b1; @(negedge clk); start = 1'b0;
    repeat (5) @(negedge clk);
    chk(sample == 4'b1000, $sformatf("from S3 after 2 steps: S4 (%b)", sample));

    // Automatic runs every PERIOD clocks.
    auto_run = 1'b1;
    runs = 0; last = -1; gaps_ok = 1;
    for (t = 0; t < 20 * PERIOD; t++) begin
      if (run_done) begin
        if (last >= 0 && t - last != PERIOD) gaps_ok = 0;
        last = t; runs++;
      end
      @(negedge clk);
    end
    chk(gaps_ok == 1 && runs >= 19, $sformatf("automatic runs every %0d clocks (%0d runs)", PERIOD, runs));
    auto_run = 1'b0;
    repeat (10) @(negedge clk);

    // Random chain, n = 1 and n = 2 from S1.
    init = 2'd0; set_init = 1'b1; @(negedge clk); set_init = 1'b0;
    rnd = 1'b1;
    for (int n = 1; n <= 2; n++) begin
      real ex [4];
      n_set = 16'(n);
      foreach (on[j]) on[j] = 0;
      for (int r = 0; r < 20000; r++) begin
        start = 1'b1; @(negedge clk); start = 1'b0;
        while (!run_done) @(negedge clk);
        foreach (on[j]) on[j] += sample[j];
      end
      if (n == 1) ex = '{0.125, 0.125, 0.25, 0.5};
      else        ex = '{0.125, 0.21875, 0.34375, 0.3125};
      foreach (on[j])
        chk(real'(on[j]) / 20000.0 > ex[j] - 0.015 && real'(on[j]) / 20000.0 < ex[j] + 0.015,
            $sformatf("n=%0d: P(S%0d) = %.4f, expected %.4f", n, j + 1, real'(on[j]) / 20000.0, ex[j]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
