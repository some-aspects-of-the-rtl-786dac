// tb_pulse_gen: checks the programmable clock pulse generator.
//
// For settings 1, 2, 9, 10, 99, 100, 371, 1000 and 9999 a start must give
// exactly that many enabled clocks, starting the clock after start, with
// the BCD count reaching the setting and done high for the one clock after
// the last pulse.  A setting of 0 gives no pulse; continuous mode enables
// every clock; a start during a run starts over.
module tb_pulse_gen;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic        start = 1'b0, cont = 1'b0, en, busy, done;
  logic [15:0] n_set = '0, count;

  pulse_gen dut (.clk, .rst_n, .start, .n_set, .cont, .en, .busy, .done, .count);

  function automatic logic [15:0] to_bcd(int n);
    return {4'(n / 1000), 4'((n / 100) % 10), 4'((n / 10) % 10), 4'(n % 10)};
  endfunction

  task automatic run_n(input int n);
    int pulses, dones, t, last_en, done_at;
    n_set = to_bcd(n);
    start = 1'b1; @(negedge clk); start = 1'b0;
    pulses = 0; dones = 0; last_en = -1; done_at = -1;
    for (t = 0; t < n + 20; t++) begin
      if (en) begin pulses++; last_en = t; end
      if (done) begin dones++; done_at = t; end
      @(negedge clk);
    end
    chk(pulses == n, $sformatf("n=%0d: %0d pulses", n, pulses));
    chk(dones == 1 && done_at == ((n == 0) ? 0 : last_en + 1), $sformatf("n=%0d: done once, after the last pulse", n));
    if (n > 0) chk(count == n_set, $sformatf("n=%0d: BCD count %h", n, count));
  endtask

  initial begin
    int pulses;
    int settings [9] = '{1, 2, 9, 10, 99, 100, 371, 1000, 9999};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(!en && !busy && !done, "idle after reset");
    foreach (settings[i]) run_n(settings[i]);
    run_n(0);

    // Restart during a run.
    n_set = to_bcd(50);
    start = 1'b1; @(negedge clk); start = 1'b0;
    repeat (20) @(negedge clk);
    start = 1'b1; @(negedge clk); start = 1'b0;
    pulses = 0;
    repeat (80) begin pulses += en; @(negedge clk); end
    chk(pulses == 50, $sformatf("restart gives a full run of 50 (%0d)", pulses));

    cont = 1'b1; #1;
    pulses = 0;
    repeat (100) begin pulses += en; @(negedge clk); end
    chk(pulses == 100, $sformatf("continuous mode passes every clock (%0d)", pulses));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
