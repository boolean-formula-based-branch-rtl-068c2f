// Branch-instruction field decoder for formula-carrying Alpha branches.
//
// The source proposes keeping the Alpha conditional-branch format (6-bit
// opcode, 5-bit register, 21-bit displacement) and reallocating N of the
// displacement bits to the formula. This decoder splits such an instruction
// and computes the branch target from the shortened displacement.
//
// Field placement (this design's choice; the source says only that N offset
// bits are reallocated): the formula occupies the top N bits of the old
// displacement field, insn[20 -: N], and the displacement keeps the low 21-N
// bits, insn[20-N:0], read as a signed instruction count. Target, as on Alpha:
// pc + 4 + 4 * disp.
//
// Conditional branches recognised (Alpha opcodes): 0x31-0x33, 0x35-0x37
// (floating point) and 0x38-0x3F (integer). 0x30 (BR) and 0x34 (BSR) are
// unconditional and are reported as not conditional.
//
// Timing: purely combinational.
module bf_branch_decode
  import bf_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned ADDR_W = 64
) (
  input  logic [INSN_W-1:0]   insn,
  input  logic [ADDR_W-1:0]   pc,
  output logic [OPCODE_W-1:0] opcode,
  output logic [REG_W-1:0]    ra,
  output logic                is_cond_branch,
  output logic [N-1:0]        formula,
  output logic [ADDR_W-1:0]   target
);

  localparam int unsigned SHORT_W = DISP_W - N;

  initial begin
    assert (N >= 2 && N < DISP_W)
      else $fatal(1, "bf_branch_decode: N=%0d leaves no displacement", N);
  end

  logic signed [SHORT_W-1:0] disp_short;
  logic signed [ADDR_W-1:0]  disp_ext;

  always_comb begin
    opcode         = insn[OPCODE_LSB +: OPCODE_W];
    ra             = insn[REG_LSB +: REG_W];
    is_cond_branch = (opcode[5:3] == 3'b111) ||
                     (opcode[5:3] == 3'b110 && opcode[1:0] != 2'b00);
    formula        = insn[DISP_W-1 -: N];
    disp_short     = insn[SHORT_W-1:0];
    disp_ext       = ADDR_W'(disp_short);
    target         = pc + ADDR_W'(4) + (disp_ext <<< 2);
  end

endmodule
