// tb_ic_loader: checks the initial-conditions loader with 40 integrators.
//
// WRITE: 40 twelve-bit words (random, plus 0, 1 and 4095) are sent
// serially, MSB first, one cc strobe per bit, after a clear with w high.
// READ: a clear with w low starts the loading of 40 integrators (real
// stoch_integrator instances, inputs OFF, on the hold and count-up lines).
// Each integrator must end one state above its word (saturating at 4095),
// the loading must take one clock per state plus two per integrator and one
// to finish, only one integrator may count at a time, count-up must then
// drop, and a second READ must load the same words again (the memory
// recirculates).  Afterwards the integrators run from their inputs.
module tb_ic_loader;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic        cc = 0, din = 0, w = 0, cm = 0;
  logic        count_up, busy;
  logic [39:0] hold;
  logic [11:0] mem_out;
  logic [11:0] count [40];
  logic [39:0] outs, scl;

  ic_loader dut (.clk, .rst_n, .cc, .din, .w, .cm, .count_up, .hold, .busy, .mem_out);

  for (genvar i = 0; i < 40; i++) begin : g_int
    stoch_integrator u_i (.clk, .rst_n, .clear(cm), .e1(1'b0), .e2(1'b0), .hold(hold[i]),
                          .count_up, .noise(12'd0), .scale_shift(1'b0), .scale_in(1'b1),
                          .scale_out(scl[i]), .count(count[i]), .out(outs[i]));
  end

  logic [11:0] word [40];

  task automatic strobe_cm(input logic wr);
    w = wr; cm = 1'b1; @(negedge clk); cm = 1'b0;
  endtask

  task automatic read_and_check(input string tag);
    int cycles, expect_cycles, bad, multi;
    strobe_cm(1'b0);
    cycles = 0; multi = 0;
    while (busy && cycles < 300000) begin
      if ($countones(~hold) > 1) multi++;
      @(negedge clk); cycles++;
    end
    expect_cycles = 1;
    foreach (word[i]) expect_cycles += word[i] + 2;
    chk(cycles == expect_cycles, $sformatf("%s: load took %0d clocks, expected %0d", tag, cycles, expect_cycles));
    chk(multi == 0, $sformatf("%s: one integrator at a time (%0d bad clocks)", tag, multi));
    chk(!count_up && hold == '0, $sformatf("%s: count-up and hold released", tag));
    bad = 0;
    foreach (word[i]) begin
      if (count[i] != ((word[i] == 12'hFFF) ? 12'hFFF : word[i] + 1)) begin
        bad++;
        $display("  position %0d: word %0d, integrator %0d", i + 1, word[i], count[i]);
      end
    end
    chk(bad == 0, $sformatf("%s: integrators one state above their words (%0d bad)", tag, bad));
    repeat (20) @(negedge clk);
    chk(count[5] == ((word[5] + 1 > 20) ? word[5] + 1 - 20 : 0),
        $sformatf("%s: integrators run (inputs OFF, counting down) afterwards", tag));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (word[i]) word[i] = 12'($urandom % 600);
    word[0] = 12'd0; word[1] = 12'd1; word[7] = 12'd4095; word[39] = 12'd17;

    strobe_cm(1'b1);
    chk(!busy && !count_up, "WRITE mode does not load");
    foreach (word[i])
      for (int b = 11; b >= 0; b--) begin
        din = word[i][b]; cc = 1'b1; @(negedge clk);
        cc = 1'b0;
        if (($urandom % 3) == 0) @(negedge clk);    // strobes need not be back to back
      end
    chk(mem_out == word[0], $sformatf("first word at the memory output (%0d)", mem_out));

    read_and_check("first READ");
    chk(mem_out == word[0], "memory back at the first word");
    read_and_check("second READ");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
