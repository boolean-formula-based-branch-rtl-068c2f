// Boolean formula evaluation circuit: the predictor proper.
//
// A read-once monotone formula over the N most recent branch outcomes is
// evaluated as a balanced binary tree of N-1 programmable connectives
// (bf_connective), followed by an XOR that complements the result when the
// invert bit is set. As the source describes, the formula whose connectives
// are all AND is defined to be the constant 0 (so with the invert bit it is
// the constant 1); a small side circuit forces the tree output to 0 in that
// case. The tree, the XOR and the constant rule follow the source; the tree's
// depth is 2*log2(N) NAND levels plus the XOR.
//
// Encoding (this design's choice, the source fixes no bit order):
//   hist[0]            x0, the most recent outcome; hist[i] is x_i
//   formula[N-1]       invert bit
//   formula[k], k<N-1  connective k in level order from the leaves:
//                      connectives 0..N/2-1 combine (x0,x1), (x2,x3), ...;
//                      the next N/4 combine pairs of those, and so on;
//                      connective N-2 is the root.
// Written as nodes: node i < N is x_i; node N+k = conn_k(node 2k, node 2k+1).
//
// Timing: purely combinational, meant to complete in the fetch cycle.
// N must be a power of two (the source's tree is shown for N = 8 and its depth
// formula assumes a balanced tree).
module bf_formula_eval #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] hist,      // global history, bit 0 most recent
  input  logic [N-1:0] formula,   // formula field from the branch instruction
  output logic         tree_out,  // monotone formula value (after constant rule)
  output logic         pred       // prediction: 1 = taken
);

  initial begin
    assert (bf_pkg::is_pow2_ge2(N))
      else $fatal(1, "bf_formula_eval: N=%0d must be a power of two >= 2", N);
  end

  logic [2*N-2:0] node;
  logic           all_and;

  assign node[N-1:0] = hist;

  for (genvar k = 0; k < N - 1; k++) begin : g_conn
    bf_connective u_conn (
      .ctrl (formula[k]),
      .a    (node[2*k]),
      .b    (node[2*k+1]),
      .y    (node[N+k])
    );
  end

  always_comb begin
    all_and  = (formula[N-2:0] == '0);
    tree_out = node[2*N-2] & ~all_and;
    pred     = tree_out ^ formula[N-1];
  end

endmodule
