// Self-checking testbench for bf_formula_eval.
//
// The reference evaluates the formula by recursive descent over the tree
// (a function of its own, not the node numbering of the design), applying the
// all-AND-is-constant-0 rule and the invert bit. Exhaustive for N = 2 and
// N = 4 and over every formula and history of N = 8 (the default); random for
// N = 16. The N = 2 cases are also written out by hand. Named
// formulas are also checked: the one printed as the tree example,
// ((x1|x2)|(x3&x4)) & ((x5|x6)&(x7|x8)) with x1..x8 mapped to hist[0..7], and
// the four-input formulas of the source's distribution table.
module tb_bf_formula_eval;
  int checks = 0, failures = 0;

  logic [1:0]  h2, f2;   logic t2, p2;
  logic [3:0]  h4, f4;   logic t4, p4;
  logic [7:0]  h8, f8;   logic t8, p8;
  logic [15:0] h16, f16; logic t16, p16;

  bf_formula_eval #(.N(2))  dut2  (.hist(h2),  .formula(f2),  .tree_out(t2),  .pred(p2));
  bf_formula_eval #(.N(4))  dut4  (.hist(h4),  .formula(f4),  .tree_out(t4),  .pred(p4));
  bf_formula_eval #(.N(8))  dut8  (.hist(h8),  .formula(f8),  .tree_out(t8),  .pred(p8));
  bf_formula_eval #(.N(16)) dut16 (.hist(h16), .formula(f16), .tree_out(t16), .pred(p16));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Value of the subtree at depth `level` (0 = root), position `pos` in that
  // level, of a tree with n leaves. Connective numbering: the level just above
  // the leaves is numbered first, the root last.
  function automatic bit subtree(int n, logic [15:0] h, logic [15:0] f, int level, int pos);
    int levels = $clog2(n);
    int base = 0;
    int width;
    bit l, r;
    if (level == levels) return h[pos];
    // connectives at depth d: n >> (d+1) of them; those deeper come first
    width = n >> 1;
    for (int d = levels - 1; d > level; d--) begin
      base += width;
      width >>= 1;
    end
    l = subtree(n, h, f, level + 1, 2 * pos);
    r = subtree(n, h, f, level + 1, 2 * pos + 1);
    return f[base + pos] ? (l || r) : (l && r);
  endfunction

  function automatic bit model(int n, logic [15:0] h, logic [15:0] f);
    bit conn_zero = 1;
    bit t;
    for (int k = 0; k < n - 1; k++) if (f[k]) conn_zero = 0;
    t = conn_zero ? 1'b0 : subtree(n, h, f, 0, 0);
    return t ^ f[n-1];
  endfunction

  task automatic check(string tag, bit got, bit exp, logic [15:0] h, logic [15:0] f);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s hist=%h formula=%h got=%0b expected=%0b", tag, h, f, got, exp);
    end
  endtask

  // Formula word for N=4 from (left, right, root) connectives and invert.
  function automatic logic [3:0] enc4(bit inv, bit left, bit right, bit root);
    return {inv, root, right, left};
  endfunction

  initial begin
    bit e;
    // N = 2: exhaustive, written out: 00 -> 0, 10 -> 1, 01 -> x0|x1, 11 -> ~(x0|x1)
    for (int f = 0; f < 4; f++)
      for (int h = 0; h < 4; h++) begin
        f2 = 2'(f); h2 = 2'(h); #1;
        e = (f2[0] ? (h2[0] | h2[1]) : 1'b0) ^ f2[1];
        check("N2", p2, e, 16'(h), 16'(f));
        check("N2 model", model(2, 16'(h), 16'(f)), e, 16'(h), 16'(f));
      end
    // N = 4: exhaustive
    for (int f = 0; f < 16; f++)
      for (int h = 0; h < 16; h++) begin
        f4 = 4'(f); h4 = 4'(h); #1;
        check("N4", p4, model(4, 16'(h), 16'(f)), 16'(h), 16'(f));
      end
    // N = 8: exhaustive
    for (int f = 0; f < 256; f++)
      for (int h = 0; h < 256; h++) begin
        f8 = 8'(f); h8 = 8'(h); #1;
        check("N8", p8, model(8, 16'(h), 16'(f)), 16'(h), 16'(f));
      end
    // N = 16: random
    for (int i = 0; i < 20000; i++) begin
      f16 = 16'($urandom); h16 = 16'($urandom);
      if (i % 8 == 0) f16[14:0] = '0;   // constant formulas
      #1;
      check("N16", p16, model(16, 16'(h16), 16'(f16)), h16, f16);
    end

    // The tree example: ((x1|x2)|(x3&x4)) & ((x5|x6)&(x7|x8)).
    // Connectives: leaves OR, AND, OR, OR; middle OR, AND; root AND.
    f8 = 8'b0_0_01_1101;  // {inv, root, mid1, mid0, leaf3..leaf0}
    for (int h = 0; h < 256; h++) begin
      h8 = 8'(h); #1;
      e = ((h8[0] | h8[1]) | (h8[2] & h8[3])) & ((h8[4] | h8[5]) & (h8[6] | h8[7]));
      check("fig-example", p8, e, 16'(h), 16'(f8));
    end

    // Four-input formulas of the distribution table, written out by hand.
    for (int h = 0; h < 16; h++) begin
      h4 = 4'(h);
      f4 = enc4(0, 1, 1, 0); #1;  // (x0|x1)&(x2|x3)
      check("t4a", p4, (h4[0] | h4[1]) & (h4[2] | h4[3]), 16'(h), 16'(f4));
      f4 = enc4(1, 1, 0, 1); #1;  // ~((x0|x1)|(x2&x3))
      check("t4b", p4, ~((h4[0] | h4[1]) | (h4[2] & h4[3])), 16'(h), 16'(f4));
      f4 = enc4(0, 0, 1, 0); #1;  // (x0&x1)&(x2|x3)
      check("t4c", p4, (h4[0] & h4[1]) & (h4[2] | h4[3]), 16'(h), 16'(f4));
      f4 = enc4(1, 0, 0, 1); #1;  // ~((x0&x1)|(x2&x3))
      check("t4d", p4, ~((h4[0] & h4[1]) | (h4[2] & h4[3])), 16'(h), 16'(f4));
      f4 = enc4(0, 0, 0, 0); #1;  // all AND: constant 0
      check("const0", p4, 1'b0, 16'(h), 16'(f4));
      f4 = enc4(1, 0, 0, 0); #1;  // all AND inverted: constant 1
      check("const1", p4, 1'b1, 16'(h), 16'(f4));
      f4 = enc4(0, 1, 1, 1); #1;  // all OR
      check("allor", p4, |h4, 16'(h), 16'(f4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
