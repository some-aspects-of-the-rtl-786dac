// disco_pkg: types and constants shared by the stochastic computer.
//
// Values are carried as single-line bipolar stochastic sequences: a line
// that is ON with probability p represents E/V = 2p - 1.  Binary values are
// 12-bit words (the width of the comparators, counters and initial-condition
// words).  The package also holds the element-type code used to fill the 34
// modular slots, the default slot fill, the patch-panel node numbering and
// the feedback taps of the m-sequence generators.
//
// Following the document: the 12-bit word, 34 modular slots, 8 fixed
// inverters, 10 fixed multipliers, 12 fixed comparators, 64 output and 96
// input nodes, slot s driving output node s and the fixed inverter 1 taking
// input node 69 and driving output node 35 (both read from the sine-wave
// example).  This design's own choices: the numbering of the remaining
// fixed elements, the default slot fill, and the shift-register lengths and
// taps of the noise generators.
package disco_pkg;

  localparam int unsigned W = 12;
  typedef logic [W-1:0] word_t;

  localparam int unsigned N_SLOTS   = 34;
  localparam int unsigned N_FIX_INV = 8;
  localparam int unsigned N_FIX_MUL = 10;
  localparam int unsigned N_FIX_CMP = 12;
  localparam int unsigned N_OUT     = 64;
  localparam int unsigned N_IN      = 96;

  // Element that a modular slot holds.
  typedef enum logic [3:0] {
    EL_EMPTY      = 4'd0,
    EL_INVERTER   = 4'd1,
    EL_MULTIPLIER = 4'd2,
    EL_SQUARER    = 4'd3,
    EL_SUMMER     = 4'd4,
    EL_INTEGRATOR = 4'd5,
    EL_ADDIE      = 4'd6,
    EL_COMPARATOR = 4'd7,
    EL_SA         = 4'd8
  } elem_e;

  // Slot map: entry s-1 is the element in slot s.
  typedef elem_e [N_SLOTS-1:0] slot_map_t;

  // Default fill: ADDIEs in slots 1-6, squarers 7-10, summers 11-20,
  // integrators 21-27 and 29-31, the S/A converter in slot 28 (input node
  // 55 of the sine-wave example), then one multiplier, one inverter and one
  // comparator in slots 32-34.
  function automatic slot_map_t default_slots();
    slot_map_t m;
    for (int s = 1; s <= int'(N_SLOTS); s++) begin
      if (s <= 6)       m[s-1] = EL_ADDIE;
      else if (s <= 10) m[s-1] = EL_SQUARER;
      else if (s <= 20) m[s-1] = EL_SUMMER;
      else if (s == 28) m[s-1] = EL_SA;
      else if (s <= 31) m[s-1] = EL_INTEGRATOR;
      else if (s == 32) m[s-1] = EL_MULTIPLIER;
      else if (s == 33) m[s-1] = EL_INVERTER;
      else              m[s-1] = EL_COMPARATOR;
    end
    return m;
  endfunction

  localparam slot_map_t DEFAULT_SLOTS = default_slots();

  // Patch-panel node numbers (1-based, as printed on the front panel).
  function automatic int unsigned slot_out_node(int unsigned s);  return s;          endfunction
  function automatic int unsigned slot_in_node(int unsigned s, int unsigned k);
    return 2*s - 1 + k;                      // k = 0: lower input, k = 1: upper
  endfunction
  function automatic int unsigned inv_in_node(int unsigned i);   return 68 + i;      endfunction
  function automatic int unsigned inv_out_node(int unsigned i);  return 34 + i;      endfunction
  function automatic int unsigned mul_in_node(int unsigned m, int unsigned k);
    return 76 + 2*m - 1 + k;
  endfunction
  function automatic int unsigned mul_out_node(int unsigned m);  return 42 + m;      endfunction
  function automatic int unsigned cmp_out_node(int unsigned c);  return 52 + c;      endfunction

  // Second feedback stage of a two-tap maximal-length shift register of
  // length n (the first is stage n itself); 0 for an unsupported length.
  function automatic int unsigned lfsr_tap(int unsigned n);
    case (n)
      7:  return 6;
      9:  return 5;
      10: return 7;
      11: return 9;
      15: return 14;
      17: return 14;
      20: return 17;
      23: return 18;
      31: return 28;
      41: return 38;
      63: return 62;
      default: return 0;
    endcase
  endfunction

  // Integrator scale code {X1,X2,X3,X4} -> number of frozen low counter
  // bits (Table 4.1: 1111 -> 12 bits, 0111 -> 11, 1011 -> 10, 1101 -> 9,
  // 1110 -> 8).  With more than one zero the shortest counter is used.
  function automatic int unsigned scale_skip(logic [3:0] x);
    if (!x[0]) return 4;       // X4
    if (!x[1]) return 3;       // X3
    if (!x[2]) return 2;       // X2
    if (!x[3]) return 1;       // X1
    return 0;
  endfunction

  // Decade counting on DIGITS packed BCD digits (digit 0 in bits 3:0).
  // Increment past all nines and decrement below zero wrap around.
  function automatic logic [15:0] bcd_step(logic [15:0] v, int unsigned digits, logic up);
    logic [15:0] r;
    logic        carry;
    r     = v;
    carry = 1'b1;
    for (int d = 0; d < 4; d++) begin
      if (d < int'(digits) && carry) begin
        if (up) begin
          if (r[4*d +: 4] >= 4'd9) r[4*d +: 4] = 4'd0;
          else begin r[4*d +: 4] = r[4*d +: 4] + 4'd1; carry = 1'b0; end
        end else begin
          if (r[4*d +: 4] == 4'd0) r[4*d +: 4] = 4'd9;
          else begin r[4*d +: 4] = r[4*d +: 4] - 4'd1; carry = 1'b0; end
        end
      end
    end
    return r;
  endfunction

endpackage
