// tb_random_walk: checks the random walk simulator.
//
// Deterministic (random numbers driven by the testbench) on the default
// four-digit walk: parallel load; steps up and down with decade carries
// and borrows; hold from the P_H comparator; no step without the step
// enable; reflection at 9999 and 0000; absorption at a boundary switched
// to absorbing, on the attempt to step past it, and only there; release by
// load.  A two-digit walk built with ABSORB_ON_ENTRY is absorbed on the
// step into 00 or 99 instead.  Statistical on a two-digit walk (100
// states, both boundaries absorbing, P_U = 1/2, start at 20, random
// numbers from $urandom): since absorption happens on the attempt to leave 00 or 99, the walk ends at
// the low boundary with probability 80/101 = 0.792 after 21 x 80 = 1680
// steps on average.
module tb_random_walk;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic        step = 0, load = 0, abs_hi = 0, abs_lo = 0;
  logic [11:0] pu_word = 12'd2048, ph_word = 12'd0, noise_u = '0, noise_h = '0;
  logic [15:0] k = '0, state;
  logic        absorbed, at_bound, up, hold;

  random_walk dut (.clk, .rst_n, .step, .pu_word, .ph_word, .noise_u, .noise_h, .k, .load,
                   .abs_hi, .abs_lo, .state, .absorbed, .at_bound, .up, .hold);

  logic        step2 = 0, load2 = 0;
  logic [11:0] nu2, nh2;
  logic [7:0]  state2;
  logic        absorbed2, b2, u2, h2;

  random_walk #(.DIGITS(2)) dut2 (.clk, .rst_n, .step(step2), .pu_word(12'd2048), .ph_word(12'd0),
                                  .noise_u(nu2), .noise_h(nh2), .k(8'h20), .load(load2),
                                  .abs_hi(1'b1), .abs_lo(1'b1), .state(state2), .absorbed(absorbed2),
                                  .at_bound(b2), .up(u2), .hold(h2));
  always @(negedge clk) begin nu2 <= 12'($urandom); nh2 <= 12'($urandom); end

  // Absorbing on entry to the boundary state.
  logic        step3 = 0, load3 = 0, abs3 = 0;
  logic [11:0] nu3 = '0;
  logic [7:0]  k3 = '0, state3;
  logic        absorbed3, b3, u3, h3;

  random_walk #(.DIGITS(2), .ABSORB_ON_ENTRY(1'b1)) dut3 (
    .clk, .rst_n, .step(step3), .pu_word(12'd2048), .ph_word(12'd0), .noise_u(nu3), .noise_h(12'd0),
    .k(k3), .load(load3), .abs_hi(abs3), .abs_lo(abs3), .state(state3), .absorbed(absorbed3),
    .at_bound(b3), .up(u3), .hold(h3));

  task automatic walk3(input logic [7:0] from, input logic dir_up, input int n);
    k3 = from; load3 = 1'b1; @(negedge clk); load3 = 1'b0;
    nu3 = dir_up ? 12'd0 : 12'd4095;
    step3 = 1'b1; repeat (n) @(negedge clk); step3 = 1'b0;
  endtask

  task automatic do_load(input logic [15:0] v);
    k = v; load = 1'b1; @(negedge clk); load = 1'b0;
  endtask

  task automatic steps(input logic dir_up, input int n);   // noise 0 -> up, 4095 -> down
    noise_u = dir_up ? 12'd0 : 12'd4095;
    step = 1'b1; repeat (n) @(negedge clk); step = 1'b0;
  endtask

  initial begin
    int lows, runs, t;
    longint dur;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    do_load(16'h0098); chk(state == 16'h0098, "load");
    steps(1, 3);       chk(state == 16'h0101, $sformatf("up with carry: %h", state));
    steps(0, 5);       chk(state == 16'h0096, $sformatf("down with borrow: %h", state));
    do_load(16'h1000); steps(0, 1); chk(state == 16'h0999, $sformatf("borrow through three digits: %h", state));
    noise_u = 12'd0; repeat (5) @(negedge clk); chk(state == 16'h0999, "no step without step enable");
    ph_word = 12'd4095; noise_h = 12'd0;
    steps(1, 10);      chk(state == 16'h0999 && hold, "P_H line holds the walk");
    ph_word = 12'd0;

    do_load(16'h9998); steps(1, 5);
    chk(state == 16'h9999 && !absorbed, $sformatf("reflecting at 9999: %h", state));
    steps(0, 1);       chk(state == 16'h9998, "leaves 9999 downwards");
    do_load(16'h0001); steps(0, 5);
    chk(state == 16'h0000 && !absorbed, $sformatf("reflecting at 0000: %h", state));
    steps(1, 1);       chk(state == 16'h0001, "leaves 0000 upwards");

    abs_hi = 1'b1;
    do_load(16'h0001); steps(0, 5);
    chk(state == 16'h0000 && !absorbed, "upper switch only: 0000 still reflects");
    do_load(16'h9997); steps(1, 2);
    chk(state == 16'h9999 && !absorbed, "not absorbed on reaching 9999");
    steps(1, 1);       chk(absorbed, "absorbed on trying to pass 9999");
    steps(0, 10);      chk(state == 16'h9999 && absorbed, "absorbed walk stays at 9999");
    do_load(16'h5000); chk(!absorbed && state == 16'h5000, "load releases the walk");
    abs_hi = 1'b0; abs_lo = 1'b1;
    do_load(16'h0002); steps(0, 3);
    chk(state == 16'h0000 && absorbed, "absorbed at 0000");
    steps(1, 4);       chk(state == 16'h0000, "absorbed walk stays at 0000");

    walk3(8'h02, 1'b0, 2);  chk(state3 == 8'h00 && !absorbed3, "on-entry option, boundaries off: reaches 00");
    abs3 = 1'b1;
    walk3(8'h02, 1'b0, 1);  chk(state3 == 8'h01 && !absorbed3, "on-entry option: not absorbed at 01");
    step3 = 1'b1; @(negedge clk); step3 = 1'b0;
    chk(state3 == 8'h00 && absorbed3, "on-entry option: absorbed on entering 00");
    walk3(8'h97, 1'b1, 5);  chk(state3 == 8'h99 && absorbed3, "on-entry option: absorbed at 99 and held");
    nu3 = 12'd4095; step3 = 1'b1; repeat (3) @(negedge clk); step3 = 1'b0;
    chk(state3 == 8'h99, "on-entry option: absorbed walk stays at 99");

    // Gambler's ruin on 100 states.
    lows = 0; dur = 0;
    for (runs = 0; runs < 300; runs++) begin
      load2 = 1'b1; @(negedge clk); load2 = 1'b0;
      step2 = 1'b1; t = 0;
      while (!absorbed2 && t < 100000) begin @(negedge clk); t++; end
      step2 = 1'b0;
      dur += t;
      if (state2 == 8'h00) lows++;
    end
    $display("absorbed low in %0d of 300 walks, mean duration %0d steps", lows, dur / 300);
    chk(real'(lows) / 300.0 > 0.72 && real'(lows) / 300.0 < 0.86, $sformatf("low absorption fraction %0d/300", lows));
    chk(dur / 300 > 1430 && dur / 300 < 1930, $sformatf("mean duration %0d, expected 1680", dur / 300));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
