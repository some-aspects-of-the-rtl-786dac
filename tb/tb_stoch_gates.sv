// tb_stoch_gates: checks the inverter, multiplier, squarer and summer.
//
// Logic: every input combination of the three combinational gates, and
// the squarer's output against its input delayed by 13 clocks.  Function:
// random input streams with chosen probabilities (from $urandom) must give
// output ON fractions matching the bipolar arithmetic: -E, E E'/V, E^2/V
// and (E + E')/2, within statistical limits.
module tb_stoch_gates;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic a = 1'b0, b = 1'b0, m = 1'b0;
  logic y_inv, y_mul, y_sq, y_sum;

  stoch_inverter   u_inv (.a, .y(y_inv));
  stoch_multiplier u_mul (.a, .b, .y(y_mul));
  stoch_squarer    u_sq  (.clk, .rst_n, .a, .y(y_sq));
  stoch_summer     u_sum (.a, .b, .m, .y(y_sum));

  function automatic logic bern(real p);
    return ($urandom % 100000) < int'(p * 100000.0);
  endfunction

  function automatic real bip(int ones, int n);   // ON fraction -> E/V
    return 2.0 * real'(ones) / real'(n) - 1.0;
  endfunction

  initial begin
    logic hist [$];
    int n, c_inv, c_mul, c_sq, c_sum, bad;
    real pa, pb, ea, eb;

    // Exhaustive logic of the combinational gates.
    for (int v = 0; v < 8; v++) begin
      {a, b, m} = 3'(v);
      #1;
      chk(y_inv == !a, $sformatf("inverter a=%0b", a));
      chk(y_mul == (a == b), $sformatf("multiplier a=%0b b=%0b", a, b));
      chk(y_sum == (m ? a : b), $sformatf("summer a=%0b b=%0b m=%0b", a, b, m));
    end

    // Squarer: output = XNOR(input, input 13 clocks earlier).
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    bad = 0;
    for (int t = 0; t < 2000; t++) begin
      a = bern(0.5);
      hist.push_back(a);
      #1;
      if (t >= 13 && y_sq != (a == hist[t-13])) bad++;
      @(negedge clk);
    end
    chk(bad == 0, $sformatf("squarer delay of 13 clocks (%0d bad)", bad));

    // Arithmetic with random streams.
    pa = 0.8; pb = 0.3;      // E/V = 0.6 and -0.4
    ea = 2.0*pa - 1.0; eb = 2.0*pb - 1.0;
    n = 100_000;
    c_inv = 0; c_mul = 0; c_sq = 0; c_sum = 0;
    for (int t = 0; t < n; t++) begin
      a = bern(pa); b = bern(pb); m = bern(0.5);
      #1;
      c_inv += y_inv; c_mul += y_mul; c_sq += y_sq; c_sum += y_sum;
      @(negedge clk);
    end
    chk(bip(c_inv, n) > -ea - 0.02 && bip(c_inv, n) < -ea + 0.02, $sformatf("inverter gives %f", bip(c_inv, n)));
    chk(bip(c_mul, n) > ea*eb - 0.02 && bip(c_mul, n) < ea*eb + 0.02, $sformatf("multiplier gives %f", bip(c_mul, n)));
    chk(bip(c_sq, n) > ea*ea - 0.02 && bip(c_sq, n) < ea*ea + 0.02, $sformatf("squarer gives %f", bip(c_sq, n)));
    chk(bip(c_sum, n) > (ea+eb)/2 - 0.02 && bip(c_sum, n) < (ea+eb)/2 + 0.02, $sformatf("summer gives %f", bip(c_sum, n)));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
