// Shared types and constants of the Boolean formula branch predictor.
//
// The predictor evaluates, at fetch, a read-once monotone Boolean formula
// carried in the branch instruction on the global branch history. A formula
// for a history of N bits is an N-bit word: N-1 connective bits, one per gate
// of a balanced binary tree (0 selects AND, 1 selects OR, as in the source
// encoding), and one invert bit that complements the tree output. The bit
// order inside that word and the placement of the field in the instruction
// are this design's own choices; see bf_formula_eval and bf_branch_decode.
package bf_pkg;

  // Connective selected by one control bit of the formula.
  typedef enum logic {
    CONN_AND = 1'b0,
    CONN_OR  = 1'b1
  } conn_op_e;

  // Alpha AXP branch format: 6-bit opcode, 5-bit register, 21-bit displacement.
  localparam int unsigned INSN_W      = 32;
  localparam int unsigned OPCODE_W    = 6;
  localparam int unsigned REG_W       = 5;
  localparam int unsigned DISP_W      = 21;
  localparam int unsigned OPCODE_LSB  = 26;
  localparam int unsigned REG_LSB     = 21;

  // Two-bit saturating counter of the agree pattern history table.
  typedef logic [1:0] ctr2_t;
  localparam ctr2_t CTR_STRONG_DISAGREE = 2'b00;
  localparam ctr2_t CTR_WEAK_DISAGREE   = 2'b01;
  localparam ctr2_t CTR_WEAK_AGREE      = 2'b10;
  localparam ctr2_t CTR_STRONG_AGREE    = 2'b11;

  // Saturating update toward "agree" (up) or "disagree" (down).
  function automatic ctr2_t ctr2_next(ctr2_t c, logic agree);
    if (agree) return (c == CTR_STRONG_AGREE) ? c : ctr2_t'(c + 2'd1);
    else       return (c == CTR_STRONG_DISAGREE) ? c : ctr2_t'(c - 2'd1);
  endfunction

  // True when v is a power of two and at least 2.
  function automatic bit is_pow2_ge2(int unsigned v);
    return (v >= 2) && ((v & (v - 1)) == 0);
  endfunction

endpackage
