// tb_disco_top: end-to-end test of the whole machine at its default size.
//
// The supervising computer's part is played by tasks that shift in the
// 576 patch-panel code bits, the 40 integrator scale-code bits and the 40
// initial-condition words, then pulse the master clear.  The patch is the
// document's sine-wave generator (integrators in slots 26 and 27, fixed
// inverter 1, S/A converter on node 26: 27 -> 51,52; 35 -> 53,54;
// 26 -> 69; 26 -> 55) with x(0) = 0 (word 2047, loaded as 2048) and
// y(0) = 0.5 V (word 3071, loaded as 3072), so slot 26 must follow
// x = 0.5 sin(2t / (N tau)): period pi N = 12868 clocks, counter swinging
// 2048 +/- 1024.  Alongside it the ADDIEs of slots 1-6 read back, through
// the patch panel, a fixed comparator (word 1024), a summer (of words 1024
// and 3072 -> 2048), a fixed multiplier (E = 0.5 x -0.5 -> 1536), a squarer
// (E = 0.5 -> 2560) and a comparator slot (word 512); integrator 21, set to
// scale code 1011 (x4), integrates a 0.75 line at 2 states per clock; the
// loader time must be the sum of (word + 2) plus 1 clocks, and a scaled
// integrator loads in its own step (word 199 at x4 gives 800).  The sine
// amplitude wanders as the two counters random-walk, so it is checked
// at the first peak (3072 +/- 250) and loosely over three periods.  The Markov
// simulator, driven by the 12 fixed comparators, must reproduce the
// one-step probabilities from S1 they set (0.047, 0.016, 0.188, 0.75) and
// time automatic runs 10,000 clocks apart.  The three random walks: one
// free, one pushed up into an absorbing 9999, one held; the displays must
// match the BCD state.  Each mechanism's occurrences are counted and
// printed.
module tb_disco_top;
  import disco_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #2_000_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  // ------------------------------------------------------------- the DUT
  logic        pp_cfg_shift = 0, pp_cfg_data = 0, pp_cfg_out;
  logic        scl_shift = 0, scl_data = 0, scl_out;
  logic        ic_cc = 0, ic_data = 0, ic_w = 0, cm = 0, ic_busy;
  logic [11:0] slot_word [N_SLOTS];
  logic [11:0] fix_cmp_word [N_FIX_CMP];
  logic [63:0] node_out;
  logic [11:0] slot_count [N_SLOTS];
  logic [24:0] slot_analog [N_SLOTS];
  logic [1:0]  mk_init = 0, mk_state;
  logic        mk_set_init = 0, mk_auto = 0, mk_start = 0, mk_cont = 0, mk_run_done, mk_busy;
  logic [15:0] mk_n = 16'h0001;
  logic [3:0]  mk_sample;
  logic [24:0] mk_analog [4];
  logic [11:0] rw_pu_word [3], rw_ph_word [3];
  logic [15:0] rw_k [3], rw_state [3];
  logic [2:0]  rw_load = 0, rw_run = 0, rw_abs_hi = 0, rw_abs_lo = 0, rw_absorbed;
  logic [27:0] rw_seg [3];

  disco_top dut (.*);

  // ------------------------------------------------- mechanism counters
  int n_pp_bits = 0, n_scale_bits = 0, n_ic_bits = 0, n_ic_words = 0, n_ic_load_clocks = 0;
  int n_sine_periods = 0, n_addie_reads = 0, n_mk_runs = 0, n_rw_steps = 0, n_rw_absorb = 0;
  int n_int_steps = 0;
  logic [2:0] absorbed_d = '0;
  logic [11:0] c21_d = '0;

  always @(posedge clk) if (rst_n) begin
    n_pp_bits    += pp_cfg_shift;
    n_scale_bits += scl_shift;
    n_ic_bits    += ic_cc;
    n_ic_load_clocks += ic_busy;
    n_mk_runs    += mk_run_done;
    n_rw_steps   += $countones(rw_run);
    n_rw_absorb  += $countones(rw_absorbed & ~absorbed_d);
    n_int_steps  += (slot_count[20] != c21_d);
    absorbed_d   <= rw_absorbed;
    c21_d        <= slot_count[20];
  end

  // ------------------------------------------- supervising-computer tasks
  logic [5:0]  code [N_IN];          // input node j+1 takes output node code+1
  logic [11:0] ic_word [40];
  logic [3:0]  scale [N_SLOTS];      // {X1,X2,X3,X4} of each integrator slot

  task automatic patch(input int out_node, input int in_node);
    code[in_node - 1] = 6'(out_node - 1);
  endtask

  task automatic load_patch();
    for (int j = N_IN - 1; j >= 0; j--)
      for (int b = 5; b >= 0; b--) begin
        pp_cfg_data = code[j][b]; pp_cfg_shift = 1'b1; @(negedge clk);
      end
    pp_cfg_shift = 1'b0;
  endtask

  task automatic load_scale();
    for (int s = N_SLOTS - 1; s >= 0; s--)
      if (DEFAULT_SLOTS[s] == EL_INTEGRATOR)
        for (int b = 3; b >= 0; b--) begin
          scl_data = scale[s][b]; scl_shift = 1'b1; @(negedge clk);
        end
    scl_shift = 1'b0;
  endtask

  task automatic write_ic();
    ic_w = 1'b1; cm = 1'b1; @(negedge clk); cm = 1'b0;
    foreach (ic_word[i]) begin
      for (int b = 11; b >= 0; b--) begin
        ic_data = ic_word[i][b]; ic_cc = 1'b1; @(negedge clk);
      end
      n_ic_words++;
    end
    ic_cc = 1'b0; ic_w = 1'b0;
  endtask

  function automatic logic [6:0] seg_of(logic [3:0] d);
    string shape [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
    logic [6:0] r = '0;
    for (int i = 0; i < shape[d].len(); i++) r[shape[d][i] - "a"] = 1'b1;
    return r;
  endfunction

  function automatic bit near(real x, real y, real tol);
    return x > y - tol && x < y + tol;
  endfunction

  // ------------------------------------------------------------ the test
  initial begin
    int t, cyc, expect_cyc, last_cross, xmax, xmin, xpeak1, c21_0, bad_seg;
    int xings [$];
    real amax, amin;
    longint sum [6];
    int on [4];
    real ex [4];

    foreach (slot_word[i]) slot_word[i] = '0;
    foreach (fix_cmp_word[i]) fix_cmp_word[i] = 12'd2048;
    fix_cmp_word[0] = 12'd1024;  // C1, node 53
    fix_cmp_word[1] = 12'd3072;  // C2, node 54
    fix_cmp_word[2] = 12'd3072;  // C3, node 55
    fix_cmp_word[3] = 12'd1024;  // C4, node 56
    slot_word[33] = 12'd512;     // comparator slot 34
    foreach (rw_k[i]) rw_k[i] = 16'h5000;
    rw_pu_word = '{12'd2048, 12'd4095, 12'd2048};
    rw_ph_word = '{12'd0, 12'd0, 12'd4095};

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Patch: the sine-wave generator and the converter read-backs.
    foreach (code[j]) code[j] = 6'd63;       // unused inputs on node 64
    patch(27, 51); patch(27, 52);            // integrator 26 <- integrator 27
    patch(35, 53); patch(35, 54);            // integrator 27 <- inverter 1
    patch(26, 69);                           // inverter 1 <- integrator 26
    patch(26, 55);                           // S/A slot 28 <- integrator 26
    patch(53, 1);                            // ADDIE 1 <- comparator C1
    patch(11, 3);                            // ADDIE 2 <- summer 11
    patch(53, 21); patch(54, 22);            // summer 11 <- C1, C2
    patch(43, 5);                            // ADDIE 3 <- multiplier 1
    patch(55, 77); patch(56, 78);            // multiplier 1 <- C3, C4
    patch(7, 7);                             // ADDIE 4 <- squarer 7
    patch(55, 13);                           // squarer 7 <- C3
    patch(34, 9);                            // ADDIE 5 <- comparator slot 34
    patch(54, 41); patch(54, 42);            // integrator 21 <- C2 twice
    patch(26, 11);                           // ADDIE 6 <- integrator 26
    load_patch();
    chk(n_pp_bits == 576, $sformatf("576 patch bits shifted (%0d)", n_pp_bits));

    foreach (scale[s]) scale[s] = 4'b1111;
    scale[20] = 4'b1011;                     // integrator 21 scaled x4
    load_scale();
    chk(n_scale_bits == 40, $sformatf("40 scale bits for 10 integrators (%0d)", n_scale_bits));

    foreach (ic_word[i]) ic_word[i] = 12'd0;
    ic_word[25] = 12'd2047;                  // x(0) = 0
    ic_word[26] = 12'd3071;                  // y(0) = 0.5 V
    ic_word[20] = 12'd199;                   // x4 scale: loads as 4 x 200
    write_ic();
    chk(n_ic_words == 40 && n_ic_bits == 480, "40 words written serially");

    // READ: load the integrators.
    cm = 1'b1; @(negedge clk); cm = 1'b0;
    cyc = 0;
    while (ic_busy && cyc < 100000) begin @(negedge clk); cyc++; end
    expect_cyc = 1;
    foreach (ic_word[i]) expect_cyc += ic_word[i] + 2;
    chk(cyc == expect_cyc, $sformatf("initial conditions loaded in %0d clocks, expected %0d", cyc, expect_cyc));
    chk(slot_count[25] == 12'd2048 && slot_count[26] == 12'd3072 && slot_count[20] == 12'd800,
        $sformatf("integrators loaded: %0d %0d %0d", slot_count[25], slot_count[26], slot_count[20]));

    // Run the sine wave for three periods.
    c21_0 = slot_count[20];
    xmax = 0; xmin = 4095; amax = 0.0; amin = 1.0; last_cross = -1;
    foreach (sum[i]) sum[i] = 0;
    for (t = 0; t < 40000; t++) begin
      int x;
      @(negedge clk);
      if (t == 499) chk(slot_count[20] - c21_0 > 900 && slot_count[20] - c21_0 < 1100,
                        $sformatf("integrator x4 scale: +%0d in 500 clocks, expected 1000", slot_count[20] - c21_0));
      x = slot_count[25];
      if (x > xmax) xmax = x;
      if (t == 6434) xpeak1 = xmax;
      if (x < xmin) xmin = x;
      if (x < 1800) last_cross = 0;
      if (last_cross == 0 && x >= 2048) begin xings.push_back(t); last_cross = 1; end
      if (t > 12000) begin
        real a;
        a = real'(slot_analog[27]) / 16777216.0;
        if (a > amax) amax = a;
        if (a < amin) amin = a;
      end
      if (t >= 30000) for (int s = 0; s < 6; s++) sum[s] += slot_count[s];
    end
    n_sine_periods = xings.size();
    $display("sine: upward crossings at %p, counter range %0d..%0d, S/A range %.3f..%.3f", xings, xmin, xmax, amin, amax);
    chk(xings.size() == 3, $sformatf("three periods in 40000 clocks (%0d)", xings.size()));
    for (int i = 0; i < xings.size(); i++) begin
      int per;
      per = (i == 0) ? xings[0] : xings[i] - xings[i-1];
      chk(per > 12000 && per < 13700, $sformatf("period %0d clocks, expected 12868", per));
    end
    chk(xpeak1 > 2822 && xpeak1 < 3322, $sformatf("first peak %0d, expected 3072", xpeak1));
    chk(xmax > 2700 && xmax < 3700 && xmin > 400 && xmin < 1400, $sformatf("three-period range: %0d..%0d", xmin, xmax));
    chk(amax > 0.56 && amax < 0.68 && amin > 0.32 && amin < 0.44, $sformatf("S/A output swing %.3f..%.3f", amin, amax));

    ex = '{1024.0, 2048.0, 1536.0, 2560.0};
    for (int s = 0; s < 4; s++) begin
      chk(near(real'(sum[s]) / 10000.0, ex[s], 80.0), $sformatf("ADDIE %0d mean %.1f, expected %.0f", s + 1, real'(sum[s]) / 10000.0, ex[s]));
      n_addie_reads++;
    end
    chk(near(real'(sum[4]) / 10000.0, 512.0, 80.0), $sformatf("ADDIE 5 (comparator slot) mean %.1f", real'(sum[4]) / 10000.0));
    n_addie_reads++;
    chk(near(real'(sum[5]) / 10000.0, 2048.0, 1100.0), "ADDIE 6 follows the sine wave");

    // Markov chain from S1, one transition, set by the fixed comparators.
    mk_init = 2'd0; mk_set_init = 1'b1; @(negedge clk); mk_set_init = 1'b0;
    foreach (on[j]) on[j] = 0;
    for (int r = 0; r < 4000; r++) begin
      mk_start = 1'b1; @(negedge clk); mk_start = 1'b0;
      while (!mk_run_done) @(negedge clk);
      foreach (on[j]) on[j] += mk_sample[j];
    end
    ex = '{0.046875, 0.015625, 0.1875, 0.75};
    foreach (on[j])
      chk(near(real'(on[j]) / 4000.0, ex[j], 0.025), $sformatf("Markov P(S%0d) = %.4f, expected %.4f", j + 1, real'(on[j]) / 4000.0, ex[j]));
    repeat (5) @(negedge clk);
    mk_auto = 1'b1;
    t = 0; xings.delete();
    while (xings.size() < 3 && t < 40000) begin
      if (mk_run_done) xings.push_back(t);
      @(negedge clk); t++;
    end
    mk_auto = 1'b0;
    chk(xings.size() == 3 && xings[1] - xings[0] == 10000 && xings[2] - xings[1] == 10000,
        $sformatf("automatic runs 10000 clocks apart (%p)", xings));

    // Random walks.
    rw_k[1] = 16'h9990; rw_abs_hi = 3'b010;
    rw_load = 3'b111; @(negedge clk); rw_load = 3'b000;
    rw_run = 3'b111;
    repeat (2000) @(negedge clk);
    rw_run = 3'b000;
    chk(rw_state[0] != 16'h5000, $sformatf("free walk moved (%h)", rw_state[0]));
    chk(rw_state[1] == 16'h9999 && rw_absorbed[1], $sformatf("pushed walk absorbed at 9999 (%h)", rw_state[1]));
    chk(rw_state[2] == 16'h5000 || rw_state[2] == 16'h5001 || rw_state[2] == 16'h4999, $sformatf("held walk stayed (%h)", rw_state[2]));
    chk(n_rw_absorb == 1, $sformatf("one absorption (%0d)", n_rw_absorb));
    bad_seg = 0;
    for (int d = 0; d < 3; d++)
      for (int g = 0; g < 4; g++)
        if (rw_seg[d][7*g +: 7] != seg_of(rw_state[d][4*g +: 4])) bad_seg++;
    chk(bad_seg == 0, $sformatf("displays show the walk states (%0d bad digits)", bad_seg));

    $display("mechanisms: patch bits %0d, scale bits %0d, IC bits %0d, IC words %0d, IC load clocks %0d,",
             n_pp_bits, n_scale_bits, n_ic_bits, n_ic_words, n_ic_load_clocks);
    $display("  integrator-21 steps %0d, sine periods %0d, ADDIE read-backs %0d, Markov runs %0d, walk steps %0d, absorptions %0d",
             n_int_steps, n_sine_periods, n_addie_reads, n_mk_runs, n_rw_steps, n_rw_absorb);
    chk(n_mk_runs == 4003, $sformatf("Markov runs counted %0d", n_mk_runs));
    chk(n_rw_steps == 6000, $sformatf("walk steps counted %0d", n_rw_steps));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
