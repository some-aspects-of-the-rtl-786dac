// tb_patch_panel: checks the automatic patch panel.
//
// Loads a random 6-bit code for each of the 96 input nodes through the
// 576-bit serial register (input node 96's code first, MSB first), then
// drives random patterns on the 64 output nodes: every input node must
// show the output node its code selects, one clock later.  Also checks
// that the register passes bits out of cfg_out after 576 shifts, that the
// codes read back, and the reset state (all input nodes on output node 1).
module tb_patch_panel;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  logic          cfg_shift = 1'b0, cfg_in = 1'b0, cfg_out;
  logic [63:0]   out_nodes = '0, prev_nodes;
  logic [95:0]   in_nodes;
  logic [575:0]  codes;

  patch_panel dut (.clk, .rst_n, .cfg_shift, .cfg_in, .cfg_out, .out_nodes, .in_nodes, .codes);

  logic [5:0] code [96];

  task automatic load_codes();
    for (int j = 95; j >= 0; j--)
      for (int b = 5; b >= 0; b--) begin
        cfg_in = code[j][b]; cfg_shift = 1'b1;
        @(negedge clk);
      end
    cfg_shift = 1'b0;
  endtask

  initial begin
    int bad, shifts;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Reset: every input node follows output node 1.
    out_nodes = 64'h1;
    @(negedge clk);
    chk(in_nodes == '1, "after reset all inputs take output node 1");
    out_nodes = 64'hFFFF_FFFF_FFFF_FFFE;
    @(negedge clk);
    chk(in_nodes == '0, "after reset output node 1 only");

    for (int round = 0; round < 3; round++) begin
      foreach (code[j]) code[j] = 6'($urandom);
      if (round == 0) begin code[0] = 6'd0; code[95] = 6'd63; code[1] = 6'd15; code[2] = 6'd16; end
      load_codes();
      bad = 0;
      foreach (code[j]) if (codes[j*6 +: 6] != code[j]) bad++;
      chk(bad == 0, $sformatf("round %0d: codes read back (%0d bad)", round, bad));

      bad = 0;
      for (int t = 0; t < 200; t++) begin
        prev_nodes = {$urandom, $urandom};
        out_nodes  = prev_nodes;
        @(negedge clk);
        out_nodes = {$urandom, $urandom};   // must not show through yet
        #1;
        foreach (code[j]) if (in_nodes[j] != prev_nodes[code[j]]) bad++;
      end
      chk(bad == 0, $sformatf("round %0d: inputs follow the selected outputs (%0d bad)", round, bad));
    end

    // The register is 576 bits long: a marker comes out after 576 shifts.
    cfg_in = 1'b0; cfg_shift = 1'b1;
    repeat (576) @(negedge clk);
    chk(codes == '0, "register flushed with zeros");
    cfg_in = 1'b1; @(negedge clk);
    cfg_in = 1'b0;
    shifts = 1;
    while (!cfg_out && shifts < 1000) begin @(negedge clk); shifts++; end
    cfg_shift = 1'b0;
    chk(shifts == 576, $sformatf("marker out after %0d shifts, expected 576", shifts));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
