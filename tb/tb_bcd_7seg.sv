// tb_bcd_7seg: checks the seven-segment decoder against the usual digit
// shapes ({g,f,e,d,c,b,a}, lit = 1) and blanking of codes 10-15.
module tb_bcd_7seg;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic [3:0] bcd;
  logic [6:0] seg;
  bcd_7seg dut (.bcd, .seg);

  // Segments lit per digit, as letters a..g.
  string shape [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  initial begin
    for (int d = 0; d < 16; d++) begin
      logic [6:0] want;
      want = '0;
      if (d < 10)
        for (int i = 0; i < shape[d].len(); i++) want[shape[d][i] - "a"] = 1'b1;
      bcd = 4'(d); #1;
      chk(seg == want, $sformatf("digit %0d: %b, expected %b", d, seg, want));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
