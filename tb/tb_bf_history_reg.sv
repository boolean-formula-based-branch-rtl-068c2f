// Self-checking testbench for bf_history_reg: random outcomes and update
// enables are applied and the register is compared each cycle with a
// reference history kept as a queue of outcomes.
module tb_bf_history_reg;
  localparam int unsigned LEN = 10;

  logic clk = 0, rst_n = 0, upd_valid = 0, upd_taken = 0;
  logic [LEN-1:0] hist;
  logic [LEN-1:0] ref_hist;
  bit   outcomes[$];
  int checks = 0, failures = 0;

  bf_history_reg #(.LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: bit i is the (i+1)-th most recent outcome, 0 if none yet.
  function automatic logic [LEN-1:0] model();
    logic [LEN-1:0] h = '0;
    for (int i = 0; i < LEN && i < outcomes.size(); i++)
      h[i] = outcomes[outcomes.size() - 1 - i];
    return h;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (hist !== '0) begin failures++; $display("FAIL reset value %h", hist); end
    for (int c = 0; c < 300; c++) begin
      upd_valid = ($urandom_range(0, 3) != 0);
      upd_taken = $urandom_range(0, 1);
      @(posedge clk);
      if (upd_valid) outcomes.push_back(upd_taken);
      #1;
      ref_hist = model();
      checks++;
      if (hist !== ref_hist) begin
        failures++;
        $display("FAIL cycle %0d hist=%b expected=%b", c, hist, ref_hist);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
