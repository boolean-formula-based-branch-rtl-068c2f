// End-to-end testbench of bf_predictor_top at its default parameters: 8-bit
// formulas, 1024-entry agree table, 10-bit global history.
// The program, profiling step, reference model and checks are described in
// bf_bench_body.svh.
module tb_bf_predictor_top;
  localparam int unsigned N = 8;
  localparam int unsigned PHT_ENTRIES = 1024;
  localparam int unsigned HIST_LEN = 10;

`include "bf_bench_body.svh"

  bf_predictor_top dut (.*);

  always @(bench_done) $finish;

endmodule
