// patch_panel: automatic patch panel of the stochastic computer.
//
// Connects any of N_OUT output nodes (element outputs) to each of N_IN
// input nodes (element inputs).  Each input node may take only one output
// node, so it needs only a SEL_W-bit code and a data selector rather than
// a full switch matrix: N_IN selectors of N_OUT lines each, and N_IN x
// SEL_W bits of patch memory (576 bits for 96 x 64).  The codes are held in
// one long serial-in shift register loaded by the supervising computer:
// on every cfg_shift strobe the register shifts by one bit, cfg_in entering
// at bit 0 of input node 1's code and the last bit of input node N_IN's
// code leaving at cfg_out.  To load, send input node N_IN's code first,
// most significant bit first, and input node 1's code last.
//
// Output nodes are sampled by the master clock before they reach the
// selectors, so a patch adds one clock of delay and no combinational path
// runs from any element input to any element input.
//
// Interface: clk, rst_n, cfg_shift, cfg_in, cfg_out, out_nodes[N_OUT]
// (bit i = output node i+1), in_nodes[N_IN] (bit j = input node j+1),
// codes (the patch memory, for read-back).
//
// From the document: one data selector per input node, the 6-bit code per
// input node, the 576-bit serial shift register.  This design's choices:
// the register order, the reset of the codes to 0 (every input node taking
// output node 1) and the register on the output nodes.
module patch_panel #(
  parameter int unsigned N_OUT = 64,
  parameter int unsigned N_IN  = 96,
  parameter int unsigned SEL_W = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_shift,
  input  logic                    cfg_in,
  output logic                    cfg_out,
  input  logic [N_OUT-1:0]        out_nodes,
  output logic [N_IN-1:0]         in_nodes,
  output logic [N_IN*SEL_W-1:0]   codes
);
  logic [N_IN*SEL_W-1:0] cfg_q;
  logic [N_OUT-1:0]      nodes_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cfg_q <= '0;
    else if (cfg_shift) cfg_q <= {cfg_q[N_IN*SEL_W-2:0], cfg_in};
  end
  assign cfg_out = cfg_q[N_IN*SEL_W-1];
  assign codes   = cfg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) nodes_q <= '0;
    else        nodes_q <= out_nodes;
  end

  for (genvar j = 0; j < int'(N_IN); j++) begin : g_sel
    data_selector #(.N_OUT(N_OUT), .SEL_W(SEL_W)) u_sel (
      .nodes(nodes_q),
      .code (cfg_q[j*SEL_W +: SEL_W]),
      .y    (in_nodes[j])
    );
  end
endmodule
