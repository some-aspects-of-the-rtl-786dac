// disco_top: digital stochastic computer with Markov chain and random walk
// simulators.
//
// The machine computes with single-line bipolar stochastic sequences.  An
// m-sequence noise source gives every element its own random number.  34
// modular slots hold one computing element each (inverter, multiplier,
// squarer, summer, integrator, ADDIE, comparator or S/A converter, fixed at
// build time by the SLOTS parameter); 30 fixed elements follow: 8
// inverters, 10 multipliers and 12 comparators.  Their 64 outputs reach
// their 96 inputs only through the automatic patch panel, whose codes the
// supervising computer loads serially.  Integrator scale codes form a
// second serial chain, and the initial-conditions loader sets the
// integrators before each run.  The 12 fixed comparators also drive the
// four-state Markov chain simulator, and three random walk simulators with
// their own noise source model walks in up to three dimensions.
//
// Node numbering (1-based, bit n-1 of the node buses): slot s drives output
// node s and takes input nodes 2s-1 (E1/A) and 2s (E2/B); fixed inverter i
// takes input node 68+i and drives output node 34+i; fixed multiplier m
// takes input nodes 75+2m and 76+2m and drives output node 42+m; fixed
// comparator c drives output node 52+c.
//
// Interface (all strobes are one master clock long):
//   clk, rst_n                    master clock, asynchronous reset
//   pp_cfg_shift/_data/_out       patch-panel code register (see patch_panel)
//   scl_shift/_data/_out           integrator scale codes: a chain through
//                                 the integrator slots from slot 1 to 34
//   ic_cc, ic_data, ic_w, cm      initial-condition loader (see ic_loader);
//                                 cm also clears every integrator and ADDIE
//   slot_word[34]                 binary input of a comparator slot
//   fix_cmp_word[12]              binary inputs of the fixed comparators
//   node_out                      the 64 output nodes
//   slot_count[34]                counter of an integrator or ADDIE slot
//   slot_analog[34]               output of an S/A converter slot, 2^24
//                                 standing for a line always ON
//   mk_*                          Markov chain simulator (see markov_sim);
//                                 mk_analog are S/A converters on its four
//                                 sample lines
//   rw_*                          one per random walk (see random_walk);
//                                 rw_run steps that walk on every clock,
//                                 rw_seg is its display, digit 0 first
//
// From the document: the element set and its counts, the 64 x 96 patch
// panel, the 40-word initial-condition facility, the serial scale codes,
// the Markov and random walk simulators, node numbers of the sine-wave
// example.  This design's choices: one master clock for everything, the
// default slot fill, numbering of the other fixed elements, the noise
// source lengths and the mapping of loader positions to slots (position s
// holds slot s; positions 35-40 are unused).
module disco_top #(
  parameter disco_pkg::slot_map_t SLOTS = disco_pkg::DEFAULT_SLOTS,
  parameter int unsigned NOISE_N   = 63,
  parameter int unsigned IC_WORDS  = 40,
  parameter int unsigned SA_KSHIFT = 12,
  parameter int unsigned MK_DIGITS = 4,
  parameter int unsigned MK_PERIOD = 10000,
  parameter int unsigned RW_DIGITS = 4,
  parameter int unsigned RW_DIMS   = 3,
  parameter int unsigned RW_NOISE_N = 31,
  parameter bit          RW_ABSORB_ON_ENTRY = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // patch panel
  input  logic        pp_cfg_shift,
  input  logic        pp_cfg_data,
  output logic        pp_cfg_out,
  // scale chain
  input  logic        scl_shift,
  input  logic        scl_data,
  output logic        scl_out,
  // initial conditions
  input  logic        ic_cc,
  input  logic        ic_data,
  input  logic        ic_w,
  input  logic        cm,
  output logic        ic_busy,
  // binary inputs and outputs of the analogue-computing part
  input  logic [11:0] slot_word    [disco_pkg::N_SLOTS],
  input  logic [11:0] fix_cmp_word [disco_pkg::N_FIX_CMP],
  output logic [disco_pkg::N_OUT-1:0] node_out,
  output logic [11:0] slot_count   [disco_pkg::N_SLOTS],
  output logic [24:0] slot_analog  [disco_pkg::N_SLOTS],
  // Markov chain simulator
  input  logic [1:0]  mk_init,
  input  logic        mk_set_init,
  input  logic [4*MK_DIGITS-1:0] mk_n,
  input  logic        mk_auto,
  input  logic        mk_start,
  input  logic        mk_cont,
  output logic [1:0]  mk_state,
  output logic [3:0]  mk_sample,
  output logic        mk_run_done,
  output logic        mk_busy,
  output logic [24:0] mk_analog [4],
  // random walk simulators
  input  logic [11:0] rw_pu_word [RW_DIMS],
  input  logic [11:0] rw_ph_word [RW_DIMS],
  input  logic [4*RW_DIGITS-1:0] rw_k [RW_DIMS],
  input  logic [RW_DIMS-1:0] rw_load,
  input  logic [RW_DIMS-1:0] rw_run,
  input  logic [RW_DIMS-1:0] rw_abs_hi,
  input  logic [RW_DIMS-1:0] rw_abs_lo,
  output logic [4*RW_DIGITS-1:0] rw_state [RW_DIMS],
  output logic [RW_DIMS-1:0] rw_absorbed,
  output logic [7*RW_DIGITS-1:0] rw_seg [RW_DIMS]
);
  import disco_pkg::*;

  localparam int unsigned NW = N_SLOTS + N_FIX_CMP;

  initial assert (IC_WORDS >= N_SLOTS) else $error("disco_top: loader needs a position per slot");

  logic [NOISE_N-1:0] lines_unused;
  logic [W-1:0]       nw [NW];
  logic [N_OUT-1:0]   out_nodes;
  logic [N_IN-1:0]    in_nodes;
  logic [N_IN*6-1:0]  codes_unused;
  logic               count_up;
  logic [IC_WORDS-1:0] hold;
  logic [W-1:0]       ic_mem_unused;
  logic [N_SLOTS:0]   sc_chain;
  logic [N_FIX_CMP-1:0] fix_cmp;

  // ---------------------------------------------------------------- noise
  noise_source #(.N(NOISE_N), .W(W), .NWORDS(NW)) u_noise (
    .clk, .rst_n, .lines(lines_unused), .words(nw)
  );

  // ----------------------------------------------------------- patch panel
  patch_panel #(.N_OUT(N_OUT), .N_IN(N_IN), .SEL_W(6)) u_pp (
    .clk, .rst_n, .cfg_shift(pp_cfg_shift), .cfg_in(pp_cfg_data), .cfg_out(pp_cfg_out),
    .out_nodes, .in_nodes, .codes(codes_unused)
  );
  assign node_out = out_nodes;

  // ---------------------------------------------------- initial conditions
  ic_loader #(.W(W), .NWORDS(IC_WORDS)) u_ic (
    .clk, .rst_n, .cc(ic_cc), .din(ic_data), .w(ic_w), .cm,
    .count_up, .hold, .busy(ic_busy), .mem_out(ic_mem_unused)
  );

  // --------------------------------------------------------- modular slots
  assign sc_chain[0] = scl_data;
  assign scl_out      = sc_chain[N_SLOTS];

  for (genvar s = 0; s < int'(N_SLOTS); s++) begin : g_slot
    logic a, b;
    assign a = in_nodes[2*s];
    assign b = in_nodes[2*s + 1];

    if (SLOTS[s] == EL_INVERTER) begin : g_inv
      stoch_inverter u_e (.a, .y(out_nodes[s]));
    end else if (SLOTS[s] == EL_MULTIPLIER) begin : g_mul
      stoch_multiplier u_e (.a, .b, .y(out_nodes[s]));
    end else if (SLOTS[s] == EL_SQUARER) begin : g_sq
      stoch_squarer u_e (.clk, .rst_n, .a, .y(out_nodes[s]));
    end else if (SLOTS[s] == EL_SUMMER) begin : g_sum
      stoch_summer u_e (.a, .b, .m(nw[s][0]), .y(out_nodes[s]));
    end else if (SLOTS[s] == EL_INTEGRATOR) begin : g_int
      stoch_integrator #(.W(W)) u_e (
        .clk, .rst_n, .clear(cm), .e1(a), .e2(b), .hold(hold[s]), .count_up,
        .noise(nw[s]), .scale_shift(scl_shift), .scale_in(sc_chain[s]),
        .scale_out(sc_chain[s+1]), .count(slot_count[s]), .out(out_nodes[s])
      );
    end else if (SLOTS[s] == EL_ADDIE) begin : g_addie
      noise_addie #(.W(W)) u_e (
        .clk, .rst_n, .clear(cm), .a, .noise(nw[s]), .count(slot_count[s]), .out(out_nodes[s])
      );
    end else if (SLOTS[s] == EL_COMPARATOR) begin : g_cmp
      stoch_comparator #(.W(W)) u_e (.nb(slot_word[s]), .nr(nw[s]), .out(out_nodes[s]));
    end else if (SLOTS[s] == EL_SA) begin : g_sa
      sa_converter #(.KSHIFT(SA_KSHIFT), .F(24)) u_e (.clk, .rst_n, .a, .v(slot_analog[s]));
      assign out_nodes[s] = 1'b0;
    end else begin : g_empty
      assign out_nodes[s] = 1'b0;
    end

    if (SLOTS[s] != EL_INTEGRATOR) begin : g_no_scale
      assign sc_chain[s+1] = sc_chain[s];
    end
    if (SLOTS[s] != EL_INTEGRATOR && SLOTS[s] != EL_ADDIE) begin : g_no_count
      assign slot_count[s] = '0;
    end
    if (SLOTS[s] != EL_SA) begin : g_no_analog
      assign slot_analog[s] = '0;
    end
  end

  // -------------------------------------------------------- fixed elements
  for (genvar i = 1; i <= int'(N_FIX_INV); i++) begin : g_finv
    stoch_inverter u_e (.a(in_nodes[inv_in_node(i)-1]), .y(out_nodes[inv_out_node(i)-1]));
  end
  for (genvar m = 1; m <= int'(N_FIX_MUL); m++) begin : g_fmul
    stoch_multiplier u_e (
      .a(in_nodes[mul_in_node(m, 0)-1]), .b(in_nodes[mul_in_node(m, 1)-1]),
      .y(out_nodes[mul_out_node(m)-1])
    );
  end
  for (genvar c = 1; c <= int'(N_FIX_CMP); c++) begin : g_fcmp
    stoch_comparator #(.W(W)) u_e (
      .nb(fix_cmp_word[c-1]), .nr(nw[N_SLOTS + c - 1]), .out(fix_cmp[c-1])
    );
    assign out_nodes[cmp_out_node(c)-1] = fix_cmp[c-1];
  end

  // ------------------------------------------------ Markov chain simulator
  markov_sim #(.DIGITS(MK_DIGITS), .PERIOD(MK_PERIOD)) u_mk (
    .clk, .rst_n, .c(fix_cmp), .init(mk_init), .set_init(mk_set_init), .n_set(mk_n),
    .auto_run(mk_auto), .start(mk_start), .cont(mk_cont), .state(mk_state),
    .sample(mk_sample), .run_done(mk_run_done), .busy(mk_busy)
  );
  for (genvar j = 0; j < 4; j++) begin : g_mk_sa
    sa_converter #(.KSHIFT(SA_KSHIFT), .F(24)) u_sa (.clk, .rst_n, .a(mk_sample[j]), .v(mk_analog[j]));
  end

  // --------------------------------------------------- random walk simulators
  logic [RW_NOISE_N-1:0] rw_lines_unused;
  logic [W-1:0] rw_nw [2*RW_DIMS];

  noise_source #(.N(RW_NOISE_N), .W(W), .NWORDS(2*RW_DIMS), .SEED(RW_NOISE_N'(64'h2545_F491_4F6C_DD1D)))
    u_rw_noise (.clk, .rst_n, .lines(rw_lines_unused), .words(rw_nw));

  for (genvar d = 0; d < int'(RW_DIMS); d++) begin : g_rw
    logic bound_unused, up_unused, hold_unused;
    random_walk #(.DIGITS(RW_DIGITS), .W(W), .ABSORB_ON_ENTRY(RW_ABSORB_ON_ENTRY)) u_rw (
      .clk, .rst_n, .step(rw_run[d]), .pu_word(rw_pu_word[d]), .ph_word(rw_ph_word[d]),
      .noise_u(rw_nw[2*d]), .noise_h(rw_nw[2*d+1]), .k(rw_k[d]), .load(rw_load[d]),
      .abs_hi(rw_abs_hi[d]), .abs_lo(rw_abs_lo[d]), .state(rw_state[d]),
      .absorbed(rw_absorbed[d]), .at_bound(bound_unused), .up(up_unused), .hold(hold_unused)
    );
    for (genvar g = 0; g < int'(RW_DIGITS); g++) begin : g_seg
      bcd_7seg u_seg (.bcd(rw_state[d][4*g +: 4]), .seg(rw_seg[d][7*g +: 7]));
    end
  end
endmodule
