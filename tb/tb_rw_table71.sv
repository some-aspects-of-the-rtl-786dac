// tb_rw_table71: the random walk experiments of Table 7.1 and Graph 7.1.
//
// Two tops with 100-state (two-digit) walks, both boundaries absorbing and
// r = 0, run gamblers' ruin from the starting states of Table 7.1 with
// p = 0.4, 0.5 and 0.6: 2000 walks per case for p = 0.4 and 0.6, 1000 for
// p = 0.5, the three walks of each top running side by side.  The mean
// duration and the fraction of walks ruined (absorbed at 00) are checked
// against the gambler's ruin formulas, four standard errors either way.
//   - The top built with RW_ABSORB_ON_ENTRY ends a walk on entering 00 or
//     99, boundaries at 0 and a = 99 as in the document's analysis; its
//     formula values are also checked against the printed Theo. column.
//   - The top built as the circuit is described ends a walk on the attempt
//     to step past 00 or 99, which is the same chain with boundaries one
//     state further out: start k + 1, a = 101.
// Graph 7.1 / Sec 8.3: with p = 0.5 the ruin probability q_k against k is
// the solution of Laplace's equation d2u/dx2 = 0 with u(-10) = +10 and
// u(10) = -10 (x = -10 + 20k/99, u = -10 + 20 q_k).  k = 10, 30, 45, 60,
// 75 and 90 are run, 500 walks each, and u is checked against the
// straight line.
module tb_rw_table71;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #400_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  localparam int A = 99;

  // Inputs shared by both tops; rw_* per top (index 0: on entry, 1: on attempt).
  logic [11:0] slot_word [34];
  logic [11:0] fix_cmp_word [12];
  logic [11:0] rw_pu_word [3], rw_ph_word [3];
  logic [7:0]  rw_k [3];
  logic [2:0]  rw_load [2], rw_run [2];
  logic [7:0]  rw_state [2][3];
  logic [2:0]  rw_absorbed [2];

  initial begin
    foreach (slot_word[i]) slot_word[i] = '0;
    foreach (fix_cmp_word[i]) fix_cmp_word[i] = '0;
    foreach (rw_ph_word[i]) rw_ph_word[i] = '0;
    foreach (rw_pu_word[i]) rw_pu_word[i] = 12'd2048;
    foreach (rw_k[i]) rw_k[i] = 8'h50;
    rw_load = '{3'b000, 3'b000};
    rw_run  = '{3'b000, 3'b000};
  end

  for (genvar g = 0; g < 2; g++) begin : g_top
    logic        pp_cfg_out, scl_out, ic_busy, mk_run_done, mk_busy;
    logic [63:0] node_out;
    logic [11:0] slot_count [34];
    logic [24:0] slot_analog [34];
    logic [1:0]  mk_state;
    logic [3:0]  mk_sample;
    logic [24:0] mk_analog [4];
    logic [13:0] rw_seg [3];

    disco_top #(.RW_DIGITS(2), .RW_ABSORB_ON_ENTRY(g == 0)) dut (
      .clk, .rst_n, .pp_cfg_shift(1'b0), .pp_cfg_data(1'b0), .pp_cfg_out,
      .scl_shift(1'b0), .scl_data(1'b0), .scl_out, .ic_cc(1'b0), .ic_data(1'b0), .ic_w(1'b0), .cm(1'b0), .ic_busy,
      .slot_word, .fix_cmp_word, .node_out, .slot_count, .slot_analog,
      .mk_init(2'b00), .mk_set_init(1'b0), .mk_n(16'h0001), .mk_auto(1'b0), .mk_start(1'b0), .mk_cont(1'b0),
      .mk_state, .mk_sample, .mk_run_done, .mk_busy, .mk_analog,
      .rw_pu_word, .rw_ph_word, .rw_k, .rw_load(rw_load[g]), .rw_run(rw_run[g]),
      .rw_abs_hi(3'b111), .rw_abs_lo(3'b111),
      .rw_state(rw_state[g]), .rw_absorbed(rw_absorbed[g]), .rw_seg
    );
  end

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Gambler's ruin from k with absorbing boundaries 0 and a.
  function automatic real ruin_dur(real p, int k, int a);
    real q = 1.0 - p, r;
    if (fabs(p - q) < 1e-9) return real'(k) * real'(a - k);
    r = q / p;
    return real'(k) / (q - p) - real'(a) / (q - p) * (1.0 - r ** k) / (1.0 - r ** a);
  endfunction

  function automatic real ruin_prob(real p, int k, int a);
    real q = 1.0 - p, r;
    if (fabs(p - q) < 1e-9) return real'(a - k) / real'(a);
    r = q / p;
    return (r ** k - r ** a) / (1.0 - r ** a);
  endfunction

  // Variance of the duration: exact for p = q, else that of the drift
  // towards the nearer-favoured boundary.
  function automatic real ruin_var(real p, int k, int a);
    real q = 1.0 - p;
    if (fabs(p - q) < 1e-9)
      return real'(k) * real'(a - k) * (real'((a - k) * (a - k) + k * k) - 2.0) / 3.0;
    return real'((q > p) ? k : a - k) * 4.0 * p * q / (fabs(q - p) ** 3);
  endfunction

  function automatic logic [7:0] bcd2(int v);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

  // Runs nwalks walks from each of ks on both tops; returns per top and
  // walk the mean duration and the fraction ruined.
  task automatic run_case(input logic [11:0] pu, input int ks [3], input int nwalks,
                          output real mean [2][3], output real ruined [2][3]);
    int     dur [2][3], done [2][3], lows [2][3];
    longint sum [2][3];
    bit     reload [2][3], all_done;
    foreach (rw_pu_word[d]) rw_pu_word[d] = pu;
    foreach (rw_k[d]) rw_k[d] = bcd2(ks[d]);
    foreach (dur[i, d]) begin dur[i][d] = 0; done[i][d] = 0; lows[i][d] = 0; sum[i][d] = 0; reload[i][d] = 1'b0; end
    rw_load = '{3'b111, 3'b111};
    rw_run  = '{3'b111, 3'b111};
    @(negedge clk);
    rw_load = '{3'b000, 3'b000};
    do begin
      @(negedge clk);
      all_done = 1'b1;
      for (int i = 0; i < 2; i++)
        for (int d = 0; d < 3; d++) begin
          if (reload[i][d]) begin
            reload[i][d] = 1'b0;
            rw_load[i][d] = 1'b0;
          end else if (done[i][d] < nwalks) begin
            dur[i][d]++;
            if (rw_absorbed[i][d]) begin
              sum[i][d] += dur[i][d];
              if (rw_state[i][d] == 8'h00) lows[i][d]++;
              dur[i][d] = 0;
              done[i][d]++;
              if (done[i][d] < nwalks) begin
                reload[i][d] = 1'b1;
                rw_load[i][d] = 1'b1;
              end else
                rw_run[i][d] = 1'b0;
            end
          end
          if (done[i][d] < nwalks) all_done = 1'b0;
        end
    end while (!all_done);
    foreach (mean[i, d]) begin
      mean[i][d]   = real'(sum[i][d]) / real'(nwalks);
      ruined[i][d] = real'(lows[i][d]) / real'(nwalks);
    end
  endtask

  task automatic check_case(input logic [11:0] pu, input int ks [3], input int nwalks,
                            input int doc_theo [3], input int doc_exp [3]);
    real mean [2][3], ruined [2][3];
    real p = real'(pu) / 4096.0;
    run_case(pu, ks, nwalks, mean, ruined);
    for (int d = 0; d < 3; d++) begin
      for (int i = 0; i < 2; i++) begin
        int  k = (i == 0) ? ks[d] : ks[d] + 1;
        int  a = (i == 0) ? A : A + 2;
        real md = ruin_dur(p, k, a), sd = $sqrt(ruin_var(p, k, a) / real'(nwalks));
        real mq = ruin_prob(p, k, a), sq = $sqrt(mq * (1.0 - mq) / real'(nwalks));
        string who = (i == 0) ? "on entry" : "on attempt";
        $display("p=%0.1f k=%0d absorbed %s: mean duration %0.1f (expected %0.1f), ruined %0.3f (expected %0.3f)",
                 p, ks[d], who, mean[i][d], md, ruined[i][d], mq);
        chk(fabs(mean[i][d] - md) < 4.0 * sd + 1.0,
            $sformatf("p=%0.1f k=%0d %s: mean duration %0.1f, expected %0.1f", p, ks[d], who, mean[i][d], md));
        chk(fabs(ruined[i][d] - mq) < 4.0 * sq + 0.005,
            $sformatf("p=%0.1f k=%0d %s: ruined %0.3f, expected %0.3f", p, ks[d], who, ruined[i][d], mq));
      end
      // The printed theoretical durations are the on-entry formula with a = 99.
      chk(fabs(ruin_dur(p, ks[d], A) - real'(doc_theo[d])) < 0.01 * real'(doc_theo[d]) + 1.0,
          $sformatf("p=%0.1f k=%0d: formula %0.1f against Table 7.1 %0d", p, ks[d], ruin_dur(p, ks[d], A), doc_theo[d]));
      $display("  Table 7.1: theoretical %0d, measured %0d", doc_theo[d], doc_exp[d]);
    end
  endtask

  task automatic check_laplace(input int ks [3], input int nwalks);
    real mean [2][3], ruined [2][3];
    run_case(12'd2048, ks, nwalks, mean, ruined);
    for (int d = 0; d < 3; d++) begin
      real x  = -10.0 + 20.0 * real'(ks[d]) / real'(A);
      real u  = -10.0 + 20.0 * ruined[0][d];
      real ue = -x;
      real mq = ruin_prob(0.5, ks[d], A), sq = $sqrt(mq * (1.0 - mq) / real'(nwalks));
      $display("Laplace: x = %0.2f  u = %0.2f (exact %0.2f)", x, u, ue);
      chk(fabs(u - ue) < 20.0 * (4.0 * sq + 0.005), $sformatf("Laplace at x = %0.2f: u = %0.2f, exact %0.2f", x, u, ue));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check_case(12'd1638, '{25, 50, 75}, 2000, '{125, 250, 375}, '{125, 246, 372});
    check_case(12'd2458, '{25, 50, 75}, 2000, '{370, 245, 120}, '{370, 247, 118});
    check_case(12'd2048, '{20, 50, 80}, 1000, '{1580, 2450, 1520}, '{1655, 2516, 1418});
    check_laplace('{10, 30, 60}, 500);
    check_laplace('{45, 75, 90}, 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
