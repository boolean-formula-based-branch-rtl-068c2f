// Global branch history shift register.
//
// Every resolved conditional branch shifts its outcome (1 = taken,
// 0 = not taken) into bit 0, so bit i holds the outcome of the (i+1)-th most
// recent branch, the x_i of the formula. One register serves all branches, as
// in the source. Updating at resolution (not speculatively at fetch) and
// clearing to all not-taken on reset are this design's choices.
//
// Timing: the new history is visible the cycle after upd_valid.
module bf_history_reg #(
  parameter int unsigned LEN = 10
) (
  input  logic           clk,
  input  logic           rst_n,      // asynchronous, active low
  input  logic           upd_valid,  // a branch resolved this cycle
  input  logic           upd_taken,  // its outcome
  output logic [LEN-1:0] hist
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         hist <= '0;
    else if (upd_valid) hist <= {hist[LEN-2:0], upd_taken};
  end

endmodule
