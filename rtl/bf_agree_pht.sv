// Agree pattern history table for the agree/formula hybrid predictor.
//
// Instead of predicting the branch direction, each 2-bit saturating counter
// predicts whether the outcome will agree with the Boolean formula's output
// (the formula takes the place that the bias bit has in a classic agree
// predictor, as the source proposes). Counter values 2 and 3 mean "agree".
// On resolution the indexed counter moves up when the outcome agreed with the
// formula output and down when it did not.
//
// This design's choices (the source gives only the function): the table is a
// flop array with one read port and one write port; all counters reset to
// weakly-agree, so an untrained table reproduces the formula prediction; the
// index is supplied by the caller (bf_predictor_top uses a gshare-style hash).
//
// Timing: the read is combinational (single-cycle prediction); a write is
// visible from the next cycle.
module bf_agree_pht
  import bf_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,       // asynchronous, active low
  input  logic [IDX_W-1:0] rd_idx,
  output logic             rd_agree,    // 1: predict outcome == formula output
  input  logic             upd_valid,
  input  logic [IDX_W-1:0] upd_idx,
  input  logic             upd_agree    // outcome agreed with formula output
);

  ctr2_t ctr [ENTRIES];

  assign rd_agree = ctr[rd_idx][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr[i] <= CTR_WEAK_AGREE;
    end else if (upd_valid) begin
      ctr[upd_idx] <= ctr2_next(ctr[upd_idx], upd_agree);
    end
  end

endmodule
