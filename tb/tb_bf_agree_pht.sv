// Self-checking testbench for bf_agree_pht.
// A reference array of counters is updated alongside the table with random
// indices (drawn from a small set so that counters saturate) and every read
// is compared. Also checks the weakly-agree reset value of every entry and
// that a write becomes visible in the next cycle.
module tb_bf_agree_pht;
  localparam int unsigned ENTRIES = 64;
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic clk = 0, rst_n = 0;
  logic [IDX_W-1:0] rd_idx = '0, upd_idx = '0;
  logic rd_agree, upd_valid = 0, upd_agree = 0;
  int   model [ENTRIES];
  int checks = 0, failures = 0;
  int saturated_hi = 0, saturated_lo = 0;

  bf_agree_pht #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit got, bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s idx=%0d got=%0b expected=%0b", what, rd_idx, got, exp);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = 2;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < ENTRIES; i++) begin
      rd_idx = IDX_W'(i); #1;
      chk("reset", rd_agree, 1'b1);
    end
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      upd_valid = $urandom_range(0, 4) != 0;
      upd_idx   = IDX_W'($urandom_range(0, 7));
      upd_agree = $urandom_range(0, 1);
      if (c % 500 < 100) upd_agree = 1;          // runs that saturate high
      else if (c % 500 < 200) upd_agree = 0;     // and low
      rd_idx = upd_idx;
      #1 chk("pre-write", rd_agree, model[upd_idx] >= 2);
      @(posedge clk);
      if (upd_valid) begin
        if (upd_agree) begin
          if (model[upd_idx] == 3) saturated_hi++;
          model[upd_idx] = (model[upd_idx] == 3) ? 3 : model[upd_idx] + 1;
        end else begin
          if (model[upd_idx] == 0) saturated_lo++;
          model[upd_idx] = (model[upd_idx] == 0) ? 0 : model[upd_idx] - 1;
        end
      end
      #1 chk("post-write", rd_agree, model[upd_idx] >= 2);
    end
    upd_valid = 0;
    for (int i = 0; i < ENTRIES; i++) begin
      rd_idx = IDX_W'(i); #1;
      chk("final", rd_agree, model[i] >= 2);
    end
    checks++;
    if (saturated_hi == 0 || saturated_lo == 0) begin
      failures++;
      $display("FAIL saturation not exercised hi=%0d lo=%0d", saturated_hi, saturated_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
