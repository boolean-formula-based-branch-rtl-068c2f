// Boolean formula branch predictor with agree/formula hybrid.
//
// At fetch, the formula field of a conditional branch is evaluated on the
// global history by a small combinational circuit (bf_formula_eval): that is
// the pure formula prediction, pred_formula. In the same cycle an agree
// pattern history table (bf_agree_pht), indexed by the branch PC hashed with
// the global history, says whether the outcome is expected to agree with the
// formula; pred_agree is the formula prediction, inverted when the table says
// "disagree". The branch target is computed from the shortened displacement.
//
// At resolution the caller returns the outcome with the two pieces of fetch
// state it was given (res_pht_idx and res_formula_pred): the outcome is
// shifted into the global history and the indexed counter is trained toward
// agree or disagree.
//
// From the source: formula encoding and evaluation circuit, one global
// history register shared by all branches, formula bits taken from the Alpha
// displacement field, agree mechanism with the formula in place of the bias
// bit, default N = 8 with a 1K-entry table (the single-cycle budget at 70 nm).
// This design's choices: the PHT index (pc[2 +: IDX_W] XOR history),
// HIST_LEN, non-speculative history update at resolution, and that fetch
// state is carried by the caller.
//
// Timing: prediction combinational from fetch inputs; history and counter
// updates take effect the cycle after res_valid. A fetch and a resolve in the
// same cycle see the state before the update.
//
// The decoder's opcode and register fields and the evaluator's tree_out are
// left unused here: the predictor needs only the conditional-branch flag, the
// formula, the target and the final prediction.
module bf_predictor_top #(
  parameter int unsigned N           = 8,
  parameter int unsigned PHT_ENTRIES = 1024,
  parameter int unsigned HIST_LEN    = 10,
  parameter int unsigned ADDR_W      = 64,
  localparam int unsigned IDX_W      = $clog2(PHT_ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch
  input  logic              fetch_valid,
  input  logic [ADDR_W-1:0] fetch_pc,
  input  logic [31:0]       fetch_insn,
  output logic              pred_valid,       // fetch_valid and a conditional branch
  output logic              pred_formula,     // pure formula prediction
  output logic              pred_agree,       // agree/formula hybrid prediction
  output logic [ADDR_W-1:0] pred_target,
  output logic [IDX_W-1:0]  pred_pht_idx,     // fetch state to return at resolve
  // resolve
  input  logic              res_valid,
  input  logic              res_taken,
  input  logic [IDX_W-1:0]  res_pht_idx,
  input  logic              res_formula_pred,
  // observation
  output logic [HIST_LEN-1:0] hist
);

  initial begin
    assert (HIST_LEN >= N && HIST_LEN >= 2)
      else $fatal(1, "bf_predictor_top: HIST_LEN=%0d must be >= N=%0d", HIST_LEN, N);
    assert (bf_pkg::is_pow2_ge2(PHT_ENTRIES))
      else $fatal(1, "bf_predictor_top: PHT_ENTRIES=%0d must be a power of two", PHT_ENTRIES);
  end

  logic [5:0]     opcode;
  logic [4:0]     ra;
  logic           is_cond;
  logic [N-1:0]   formula;
  logic           tree_out;
  logic           agree_bit;
  logic [IDX_W-1:0] hist_idx;

  bf_branch_decode #(.N(N), .ADDR_W(ADDR_W)) u_decode (
    .insn           (fetch_insn),
    .pc             (fetch_pc),
    .opcode         (opcode),
    .ra             (ra),
    .is_cond_branch (is_cond),
    .formula        (formula),
    .target         (pred_target)
  );

  bf_history_reg #(.LEN(HIST_LEN)) u_hist (
    .clk       (clk),
    .rst_n     (rst_n),
    .upd_valid (res_valid),
    .upd_taken (res_taken),
    .hist      (hist)
  );

  bf_formula_eval #(.N(N)) u_eval (
    .hist     (hist[N-1:0]),
    .formula  (formula),
    .tree_out (tree_out),
    .pred     (pred_formula)
  );

  always_comb begin
    hist_idx     = IDX_W'(hist);
    pred_pht_idx = fetch_pc[2 +: IDX_W] ^ hist_idx;
    pred_valid   = fetch_valid && is_cond;
    pred_agree   = pred_formula ^ ~agree_bit;
  end

  bf_agree_pht #(.ENTRIES(PHT_ENTRIES)) u_pht (
    .clk       (clk),
    .rst_n     (rst_n),
    .rd_idx    (pred_pht_idx),
    .rd_agree  (agree_bit),
    .upd_valid (res_valid),
    .upd_idx   (res_pht_idx),
    .upd_agree (res_taken == res_formula_pred)
  );

endmodule
