// tb_stoch_comparator: checks the binary-to-stochastic comparator.
//
// The output must be ON exactly when the binary number exceeds the random
// number: checked for all pairs of a 6-bit instance and for random pairs of
// the default 12-bit one, plus the end cases.  With uniform random numbers
// a word nb then gives an ON fraction of nb / 4096.
module tb_stoch_comparator;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic [5:0]  nb6, nr6;
  logic        o6;
  logic [11:0] nb, nr;
  logic        o;
  stoch_comparator #(.W(6)) u6 (.nb(nb6), .nr(nr6), .out(o6));
  stoch_comparator          u12 (.nb, .nr, .out(o));

  initial begin
    int bad, ones;
    bad = 0;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        nb6 = 6'(i); nr6 = 6'(j); #1;
        if (o6 != (i > j)) bad++;
      end
    chk(bad == 0, $sformatf("6-bit exhaustive (%0d bad)", bad));

    bad = 0;
    for (int t = 0; t < 20000; t++) begin
      nb = 12'($urandom); nr = 12'($urandom); #1;
      if (o != (nb > nr)) bad++;
    end
    chk(bad == 0, $sformatf("12-bit random pairs (%0d bad)", bad));

    nb = 12'd0;    nr = 12'd0;    #1; chk(o == 1'b0, "0 vs 0 is OFF");
    nb = 12'd4095; nr = 12'd4095; #1; chk(o == 1'b0, "equal is OFF");
    nb = 12'd4095; nr = 12'd4094; #1; chk(o == 1'b1, "4095 vs 4094 is ON");
    nb = 12'd1;    nr = 12'd0;    #1; chk(o == 1'b1, "1 vs 0 is ON");

    ones = 0;
    nb = 12'd1024;
    for (int t = 0; t < 40000; t++) begin
      nr = 12'($urandom); #1;
      ones += o;
    end
    chk(ones > 9600 && ones < 10400, $sformatf("word 1024 gives ON fraction %0d/40000", ones));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
