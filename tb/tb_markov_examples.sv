// tb_markov_examples: the Markov chain simulator's two worked examples,
// run on the full machine (disco_top at its default parameters).
//
// Example 1: every comparator at 0.5, giving the matrix with rows
// (.125 .125 .25 .5), (.125 .125 .25 .5), (.125 .25 .125 .5),
// (.125 .25 .5 .125); the distribution after n = 1..6 transitions from
// each starting state is compared with the matrix power.
// Example 2: the taxicab zones, matrix
//   0.8 0.14 0.05 0.01 / 0.6 0.2 0.18 0.02 / 0.5 0.4 0.05 0.05 / 0.3 0.3 0.3 0.1
// with comparator words from C3 = P14, C2 = P13 / (1 - P14),
// C1 = P12 / (1 - P13 - P14) and likewise per row; the answers to
// (a) S1 after 4 fares from S4 (0.725), (b) S1 after 2 fares from S1
// (0.752) and (c) S1 after 10 fares (0.734) are checked, as is the whole
// distribution against the matrix power.  Each estimate uses 3000 runs; the
// tolerance is 0.03, about four standard deviations.
module tb_markov_examples;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #2_000_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic        pp_cfg_out, scl_out, ic_busy;
  logic [11:0] slot_word [34];
  logic [11:0] fix_cmp_word [12];
  logic [63:0] node_out;
  logic [11:0] slot_count [34];
  logic [24:0] slot_analog [34];
  logic [1:0]  mk_init = 0, mk_state;
  logic        mk_set_init = 0, mk_start = 0, mk_run_done, mk_busy;
  logic [15:0] mk_n = 16'h0001;
  logic [3:0]  mk_sample;
  logic [24:0] mk_analog [4];
  logic [11:0] rw_pu_word [3], rw_ph_word [3];
  logic [15:0] rw_k [3], rw_state [3];
  logic [2:0]  rw_absorbed;
  logic [27:0] rw_seg [3];

  disco_top dut (
    .clk, .rst_n, .pp_cfg_shift(1'b0), .pp_cfg_data(1'b0), .pp_cfg_out,
    .scl_shift(1'b0), .scl_data(1'b0), .scl_out, .ic_cc(1'b0), .ic_data(1'b0), .ic_w(1'b0), .cm(1'b0), .ic_busy,
    .slot_word, .fix_cmp_word, .node_out, .slot_count, .slot_analog,
    .mk_init, .mk_set_init, .mk_n, .mk_auto(1'b0), .mk_start, .mk_cont(1'b0), .mk_state, .mk_sample,
    .mk_run_done, .mk_busy, .mk_analog,
    .rw_pu_word, .rw_ph_word, .rw_k, .rw_load(3'b000), .rw_run(3'b000), .rw_abs_hi(3'b000), .rw_abs_lo(3'b000),
    .rw_state, .rw_absorbed, .rw_seg
  );

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  typedef real mat_t [4][4];
  typedef real vec_t [4];

  // Comparator words for a matrix: per row the three off-diagonal entries
  // in the order of the row's lines (weakest first), strongest set first.
  task automatic set_matrix(input mat_t m);
    int dst [4][3] = '{'{1, 2, 3}, '{0, 2, 3}, '{0, 1, 3}, '{0, 1, 2}};
    for (int s = 0; s < 4; s++) begin
      real a, b, c;
      c = m[s][dst[s][2]];
      b = m[s][dst[s][1]] / (1.0 - c);
      a = m[s][dst[s][0]] / (1.0 - c - m[s][dst[s][1]]);
      fix_cmp_word[3*s + 2] = 12'($rtoi(c * 4096.0 + 0.5));
      fix_cmp_word[3*s + 1] = 12'($rtoi(b * 4096.0 + 0.5));
      fix_cmp_word[3*s]     = 12'($rtoi(a * 4096.0 + 0.5));
    end
  endtask

  function automatic vec_t predict(mat_t m, int from, int n);
    vec_t v, w;
    foreach (v[i]) v[i] = (i == from) ? 1.0 : 0.0;
    repeat (n) begin
      foreach (w[j]) begin
        w[j] = 0.0;
        for (int i = 0; i < 4; i++) w[j] += v[i] * m[i][j];
      end
      v = w;
    end
    return v;
  endfunction

  task automatic estimate(input int from, input int n, input int runs, output vec_t est);
    int on [4] = '{0, 0, 0, 0};
    mk_init = 2'(from); mk_set_init = 1'b1; @(negedge clk); mk_set_init = 1'b0;
    mk_n = {4'(n / 1000), 4'((n / 100) % 10), 4'((n / 10) % 10), 4'(n % 10)};
    repeat (runs) begin
      mk_start = 1'b1; @(negedge clk); mk_start = 1'b0;
      while (!mk_run_done) @(negedge clk);
      foreach (on[j]) on[j] += mk_sample[j];
    end
    foreach (est[j]) est[j] = real'(on[j]) / real'(runs);
  endtask

  task automatic compare(input mat_t m, input int from, input int n, input string tag);
    vec_t est, th;
    real worst;
    estimate(from, n, 3000, est);
    th = predict(m, from, n);
    worst = 0.0;
    foreach (est[j]) if (fabs(est[j] - th[j]) > worst) worst = fabs(est[j] - th[j]);
    $display("%s from S%0d, n=%0d: simulated %.3f %.3f %.3f %.3f, predicted %.3f %.3f %.3f %.3f",
             tag, from + 1, n, est[0], est[1], est[2], est[3], th[0], th[1], th[2], th[3]);
    chk(worst < 0.03, $sformatf("%s from S%0d, n=%0d: largest error %.3f", tag, from + 1, n, worst));
  endtask

  initial begin
    mat_t half = '{'{0.125, 0.125, 0.25, 0.5}, '{0.125, 0.125, 0.25, 0.5}, '{0.125, 0.25, 0.125, 0.5}, '{0.125, 0.25, 0.5, 0.125}};
    mat_t taxi = '{'{0.8, 0.14, 0.05, 0.01}, '{0.6, 0.2, 0.18, 0.02}, '{0.5, 0.4, 0.05, 0.05}, '{0.3, 0.3, 0.3, 0.1}};
    vec_t est;

    foreach (slot_word[i]) slot_word[i] = '0;
    foreach (rw_k[i]) begin rw_k[i] = '0; rw_pu_word[i] = '0; rw_ph_word[i] = '0; end
    foreach (fix_cmp_word[i]) fix_cmp_word[i] = 12'd2048;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Example 1: all comparators at 0.5.
    set_matrix(half);
    chk(fix_cmp_word[0] == 12'd2048 && fix_cmp_word[5] == 12'd2048 && fix_cmp_word[11] == 12'd2048,
        "the all-0.5 matrix needs every comparator at 0.5");
    for (int from = 0; from < 4; from++)
      for (int n = 1; n <= 6; n += (n < 3) ? 1 : 3)
        compare(half, from, n, "equal probabilities");

    // Example 2: taxicab zones.
    set_matrix(taxi);
    estimate(3, 4, 3000, est);
    $display("(a) S1 after 4 fares from S4: %.3f (predicted 0.725)", est[0]);
    chk(fabs(est[0] - 0.725) < 0.03, "(a)");
    estimate(0, 2, 3000, est);
    $display("(b) S1 after 2 fares from S1: %.3f (predicted 0.752)", est[0]);
    chk(fabs(est[0] - 0.752) < 0.03, "(b)");
    for (int from = 0; from < 4; from++) begin
      estimate(from, 10, 3000, est);
      $display("(c) S1 after 10 fares from S%0d: %.3f (predicted 0.734)", from + 1, est[0]);
      chk(fabs(est[0] - 0.734) < 0.03, $sformatf("(c) from S%0d", from + 1));
    end
    compare(taxi, 3, 1, "taxicab");
    compare(taxi, 2, 3, "taxicab");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
