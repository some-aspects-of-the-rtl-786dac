// data_selector: one input node's selector in the patch panel.
//
// Selects one of N_OUT output-node lines with a SEL_W-bit code, built the
// way the document builds its 64-to-1 selector: a first stage of 16-to-1
// selectors (SN74150 type) that all share the low four code bits, so each
// picks the same position within its group of 16 output nodes, and a
// second stage (an SN74151 used as a 4-to-1 selector) that picks one group
// with the upper code bits.  Output nodes 1-16 form group 0, 17-32 group 1
// and so on; code value c selects output node c + 1.  Combinational.
//
// From the document: the two-stage structure and the code assignment.
// This design's choice: true (non-inverted) outputs from the first stage.
module data_selector #(
  parameter int unsigned N_OUT = 64,
  parameter int unsigned SEL_W = 6
) (
  input  logic [N_OUT-1:0] nodes,
  input  logic [SEL_W-1:0] code,
  output logic             y
);
  localparam int unsigned G = N_OUT / 16;

  initial assert (N_OUT % 16 == 0 && (1 << (SEL_W - 4)) >= G)
    else $error("data_selector: N_OUT must be a multiple of 16 reachable by the code");

  logic [G-1:0] first;

  always_comb begin
    for (int g = 0; g < int'(G); g++)
      first[g] = nodes[g*16 + int'(code[3:0])];
  end

  always_comb begin
    y = 1'b0;
    for (int g = 0; g < int'(G); g++)
      if (int'(code[SEL_W-1:4]) == g) y = first[g];
  end
endmodule
