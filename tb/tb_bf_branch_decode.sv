// Self-checking testbench for bf_branch_decode at N = 8 and N = 16.
// Instructions are assembled from random fields and the decoded fields and
// branch target are compared with the values used to assemble them.
module tb_bf_branch_decode;
  int checks = 0, failures = 0;

  logic [31:0] insn8, insn16;
  logic [63:0] pc;
  logic [5:0]  op8, op16;
  logic [4:0]  ra8, ra16;
  logic        c8, c16;
  logic [7:0]  f8;
  logic [15:0] f16;
  logic [63:0] t8, t16;

  bf_branch_decode #(.N(8))  dut8  (.insn(insn8),  .pc(pc), .opcode(op8),  .ra(ra8),
                                    .is_cond_branch(c8),  .formula(f8),  .target(t8));
  bf_branch_decode #(.N(16)) dut16 (.insn(insn16), .pc(pc), .opcode(op16), .ra(ra16),
                                    .is_cond_branch(c16), .formula(f16), .target(t16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%h expected=%h (insn8=%h insn16=%h pc=%h)", what, got, exp, insn8, insn16, pc);
    end
  endtask

  // Conditional-branch opcodes of the Alpha AXP, listed by name.
  function automatic bit alpha_cond(int op);
    case (op)
      'h31, 'h32, 'h33, 'h35, 'h36, 'h37,                 // FBEQ FBLT FBLE FBNE FBGE FBGT
      'h38, 'h39, 'h3A, 'h3B, 'h3C, 'h3D, 'h3E, 'h3F:     // BLBC BEQ BLT BLE BLBS BNE BGE BGT
        return 1;
      default: return 0;
    endcase
  endfunction

  initial begin
    int op, r, form, d;
    longint dl;
    for (int i = 0; i < 2000; i++) begin
      op = (i < 64) ? i : $urandom_range(0, 63);
      r  = $urandom_range(0, 31);
      pc = {$urandom, $urandom} & ~64'h3;
      // N = 8: 8 formula bits, 13 displacement bits
      form = $urandom_range(0, 255);
      d    = $urandom_range(0, 8191) - 4096;
      insn8 = {6'(op), 5'(r), 8'(form), 13'(d)};
      // N = 16: 16 formula bits, 5 displacement bits
      insn16 = {6'(op), 5'(r), 16'(form * 257), 5'(d % 16)};
      #1;
      chk("op8", 64'(op8), 64'(op));
      chk("ra8", 64'(ra8), 64'(r));
      chk("cond8", 64'(c8), 64'(alpha_cond(op)));
      chk("form8", 64'(f8), 64'(form));
      dl = d;
      chk("target8", t8, pc + 64'(4 + 4 * dl));
      chk("op16", 64'(op16), 64'(op));
      chk("form16", 64'(f16), 64'(form * 257));
      dl = d % 16;
      chk("target16", t16, pc + 64'(4 + 4 * dl));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
