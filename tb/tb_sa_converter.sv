// tb_sa_converter: checks the stochastic-to-analogue converter model.
//
// With the input held ON from reset the first-order filter (K = 1/4096)
// must rise by exactly K in the first clock, reach 1 - 1/e of full scale
// after 4096 clocks and 1 - 1/e^2 after 8192; the second-order filter must
// follow 1 - (1 + Kt) e^(-Kt).  A random stream of probability 0.25 must
// give an average output of 0.25.
module tb_sa_converter;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic        a = 1'b0;
  logic [24:0] v1, v2;
  sa_converter                u1 (.clk, .rst_n, .a, .v(v1));
  sa_converter #(.ORDER(2))   u2 (.clk, .rst_n, .a, .v(v2));

  function automatic real fs(logic [24:0] v);
    return real'(v) / 16777216.0;
  endfunction

  function automatic bit near(real x, real y, real tol);
    return (x > y - tol) && (x < y + tol);
  endfunction

  initial begin
    real s;
    repeat (2) @(negedge clk);
    chk(v1 == 0 && v2 == 0, "reset to 0");
    rst_n = 1'b1;
    a = 1'b1;
    @(negedge clk);
    chk(v1 == 25'd4096, $sformatf("first clock adds K: %0d", v1));
    repeat (4095) @(negedge clk);
    chk(near(fs(v1), 1.0 - $exp(-1.0), 0.002), $sformatf("first order at t=N: %f", fs(v1)));
    chk(near(fs(v2), 1.0 - 2.0 * $exp(-1.0), 0.002), $sformatf("second order at t=N: %f", fs(v2)));
    repeat (4096) @(negedge clk);
    chk(near(fs(v1), 1.0 - $exp(-2.0), 0.002), $sformatf("first order at t=2N: %f", fs(v1)));
    chk(near(fs(v2), 1.0 - 3.0 * $exp(-2.0), 0.002), $sformatf("second order at t=2N: %f", fs(v2)));

    for (int t = 0; t < 40000; t++) begin a = ($urandom % 4) == 0; @(negedge clk); end
    s = 0.0;
    for (int t = 0; t < 40000; t++) begin a = ($urandom % 4) == 0; @(negedge clk); s += fs(v1); end
    chk(near(s / 40000.0, 0.25, 0.02), $sformatf("p = 0.25 gives %f", s / 40000.0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
