// tb_noise_addie: checks the ADDIE (stochastic-to-digital converter).
//
// Cycle-exact: with the input ON and the output held OFF (random number
// 4095) the counter rises one state per clock.  Step response with noise:
// an input stream of probability 0.75 (word 3072 into a comparator) drives
// the ADDIE from 0; a 4096-state ADDIE has time constant 4096 clocks, so
// the counter first comes within 10% of 3072 after about 9400 clocks and
// within 5% after about 12300 (the document's settling times).  It must
// then average 3072, and after a step of the input to 0.25 settle near
// 1024.
module tb_noise_addie;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic [62:0] lines;
  logic [11:0] words [2];
  noise_source #(.NWORDS(2)) u_noise (.clk, .rst_n, .lines, .words);

  logic [11:0] in_word = 12'd3072, noise;
  logic        a, a_cmp, clear = 1'b0, force_in = 1'b0, force_noise = 1'b0, out;
  logic [11:0] count;

  stoch_comparator u_src (.nb(in_word), .nr(words[0]), .out(a_cmp));
  assign a     = force_in ? 1'b1 : a_cmp;
  assign noise = force_noise ? 12'hFFF : words[1];

  noise_addie dut (.clk, .rst_n, .clear, .a, .noise, .count, .out);

  initial begin
    int t10, t5, t;
    longint sum;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    force_in = 1'b1; force_noise = 1'b1;
    repeat (100) @(negedge clk);
    chk(count == 100, $sformatf("input ON, output OFF: 100 clocks -> %0d", count));
    force_in = 1'b0; force_noise = 1'b0;
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    chk(count == 0, "clear");

    t = 0; t10 = -1; t5 = -1;
    while (t < 20000 && t5 < 0) begin
      @(negedge clk); t++;
      if (t10 < 0 && count >= 12'd2765) t10 = t;
      if (t5 < 0 && count >= 12'd2918) t5 = t;
    end
    $display("within 10%% after %0d clocks, within 5%% after %0d clocks", t10, t5);
    chk(t10 > 8000 && t10 < 10500, $sformatf("10%% settling %0d clocks, expected about 9400", t10));
    chk(t5 > 10000 && t5 < 13500, $sformatf("5%% settling %0d clocks, expected about 12300", t5));

    repeat (8000) @(negedge clk);
    sum = 0;
    for (int i = 0; i < 40000; i++) begin @(negedge clk); sum += count; end
    chk(sum / 40000 > 3030 && sum / 40000 < 3114, $sformatf("mean %0d, expected 3072", sum / 40000));

    in_word = 12'd1024;
    repeat (30000) @(negedge clk);
    sum = 0;
    for (int i = 0; i < 40000; i++) begin @(negedge clk); sum += count; end
    chk(sum / 40000 > 982 && sum / 40000 < 1066, $sformatf("mean after step %0d, expected 1024", sum / 40000));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
