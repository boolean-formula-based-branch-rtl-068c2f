// Self-checking testbench for bf_connective: all eight input combinations are
// compared with the AND/OR selection written directly.
module tb_bf_connective;
  import bf_pkg::*;

  logic ctrl, a, b, y;
  int checks = 0, failures = 0;

  bf_connective dut (.ctrl(ctrl), .a(a), .b(b), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int v = 0; v < 8; v++) begin
      {ctrl, a, b} = 3'(v);
      #1;
      expected = (conn_op_e'(ctrl) == CONN_OR) ? (a | b) : (a & b);
      checks++;
      if (y !== expected) begin
        failures++;
        $display("FAIL ctrl=%0b a=%0b b=%0b y=%0b expected=%0b", ctrl, a, b, y, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
