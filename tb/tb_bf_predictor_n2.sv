// End-to-end testbench of bf_predictor_top with 2-bit formulas and a
// 1024-entry agree table.
// The program, profiling step, reference model and checks are described in
// bf_bench_body.svh.
module tb_bf_predictor_n2;
  localparam int unsigned N = 2;
  localparam int unsigned PHT_ENTRIES = 1024;
  localparam int unsigned HIST_LEN = 10;

`include "bf_bench_body.svh"

  bf_predictor_top #(.N(N), .PHT_ENTRIES(PHT_ENTRIES), .HIST_LEN(HIST_LEN)) dut (.*);

  always @(bench_done) $finish;

endmodule
