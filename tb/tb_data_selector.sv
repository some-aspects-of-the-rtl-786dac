// tb_data_selector: checks the 64-to-1 data selector of the patch panel.
// For every code 0..63 and random node patterns (plus a walking one) the
// output must equal output node code + 1 (bit code of the node bus).
module tb_data_selector;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #10_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic [63:0] nodes;
  logic [5:0]  code;
  logic        y;
  data_selector dut (.nodes, .code, .y);

  initial begin
    for (int c = 0; c < 64; c++) begin
      int bad;
      bad = 0;
      code = 6'(c);
      for (int t = 0; t < 50; t++) begin
        nodes = {$urandom, $urandom}; #1;
        if (y != nodes[c]) bad++;
      end
      nodes = 64'd1 << c; #1; if (y != 1'b1) bad++;
      nodes = ~(64'd1 << c); #1; if (y != 1'b0) bad++;
      chk(bad == 0, $sformatf("code %0d selects node %0d (%0d bad)", c, c + 1, bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
