// tb_stoch_integrator: checks the summing integrator.
//
// With the random number driven directly: the counter moves one state per
// clock up when both inputs are ON, down when both are OFF and not at all
// when they differ (cycle-exact counts); hold freezes it; count_up forces
// counting up; clear zeroes it; it saturates at 0 and 4095; the output is
// ON exactly when the counter exceeds the random number; the scale codes
// 1111, 0111, 1011, 1101, 1110 give steps of 1, 2, 4, 8, 16 (counter of
// 12..8 bits) and the code shifts out of scale_out.  With random input
// streams the counter drifts at p1 + p2 - 1 states per clock.
module tb_stoch_integrator;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic        clear = 0, e1 = 0, e2 = 0, hold = 0, count_up = 0, scale_shift = 0, scale_in = 0;
  logic [11:0] noise = '0, count;
  logic        scale_out, out;

  stoch_integrator dut (.clk, .rst_n, .clear, .e1, .e2, .hold, .count_up, .noise,
                        .scale_shift, .scale_in, .scale_out, .count, .out);

  task automatic run(input logic a, input logic b, input int n);
    e1 = a; e2 = b;
    repeat (n) @(negedge clk);
  endtask

  task automatic load_scale(input logic [3:0] x);   // x = {X1,X2,X3,X4}
    for (int i = 3; i >= 0; i--) begin
      scale_in = x[i]; scale_shift = 1'b1;
      @(negedge clk);
    end
    scale_shift = 1'b0;
  endtask

  function automatic logic bern(real p);
    return ($urandom % 100000) < int'(p * 100000.0);
  endfunction

  initial begin
    int c0, bad;
    logic [3:0] codes [5] = '{4'b1111, 4'b0111, 4'b1011, 4'b1101, 4'b1110};
    repeat (2) @(negedge clk);
    chk(count == 0 && scale_out == 1'b1, "reset: counter 0, scale code 1111");
    rst_n = 1'b1;

    run(1, 1, 100);  chk(count == 100, $sformatf("100 clocks both ON -> %0d", count));
    run(1, 0, 50);   chk(count == 100, "E1 ON, E2 OFF holds");
    run(0, 1, 50);   chk(count == 100, "E1 OFF, E2 ON holds");
    run(0, 0, 30);   chk(count == 70,  $sformatf("30 clocks both OFF -> %0d", count));
    hold = 1'b1; run(1, 1, 40); chk(count == 70, "hold freezes the counter");
    hold = 1'b0;
    count_up = 1'b1; run(0, 0, 10); chk(count == 80, "count_up counts up with inputs OFF");
    count_up = 1'b0;
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    chk(count == 0, "clear");
    run(0, 0, 5); chk(count == 0, "no count below 0");
    run(1, 1, 4200); chk(count == 4095, "saturates at 4095");

    // Output against the random number.
    bad = 0;
    for (int t = 0; t < 3000; t++) begin
      e1 = $urandom; e2 = $urandom; noise = 12'($urandom);
      #1; if (out != (count > noise)) bad++;
      @(negedge clk);
    end
    chk(bad == 0, $sformatf("output is counter > random number (%0d bad)", bad));

    // Scaling.
    foreach (codes[i]) begin
      load_scale(codes[i]);
      clear = 1'b1; @(negedge clk); clear = 1'b0;
      run(1, 1, 10);
      chk(count == 10 * (1 << i), $sformatf("scale code %b: 10 clocks -> %0d", codes[i], count));
      run(0, 0, 3);
      chk(count == 7 * (1 << i), $sformatf("scale code %b counts down", codes[i]));
    end
    // The last code loaded (1110) leaves X1 first.
    chk(scale_out == 1'b1, "scale_out is X1");
    load_scale(4'b0000);
    chk(scale_out == 1'b0, "new code shifted in");
    load_scale(4'b1111);

    // Drift with random streams: p1 = 0.8, p2 = 0.7 -> +0.5 per clock.
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    run(1, 1, 1000);
    c0 = count;
    for (int t = 0; t < 4000; t++) begin
      e1 = bern(0.8); e2 = bern(0.7);
      @(negedge clk);
    end
    chk(count - c0 > 1900 && count - c0 < 2100, $sformatf("drift %0d in 4000 clocks, expected 2000", count - c0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
