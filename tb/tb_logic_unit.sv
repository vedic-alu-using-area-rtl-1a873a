// Self-checking testbench for logic_unit at its default width of 16 bits.
// Checks AND, OR and XOR on fixed and random operands against the
// simulator's own bitwise operators. Combinational: each vector is held
// for 1 ns. A watchdog ends the run with a failure if it has not finished
// in time.
module tb_logic_unit;
  import alu_pkg::*;

  logic [15:0] a, b, result;
  logic_op_e   op;
  int checks = 0, failures = 0;

  logic_unit dut (.a(a), .b(b), .op(op), .result(result));

  task automatic check(input logic [15:0] x, input logic [15:0] y, input logic_op_e o);
    logic [15:0] model;
    a = x; b = y; op = o;
    #1;
    case (o)
      LOG_AND: model = x & y;
      LOG_OR:  model = x | y;
      default: model = x ^ y;
    endcase
    checks++;
    if (result !== model) begin
      failures++;
      if (failures < 10) $display("FAIL op %0d %h %h = %h, expected %h", o, x, y, result, model);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic_op_e ops [3] = '{LOG_AND, LOG_OR, LOG_XOR};
    foreach (ops[k]) begin
      check(16'hf0f0, 16'hff00, ops[k]);
      check(16'h0000, 16'hffff, ops[k]);
      for (int n = 0; n < 10000; n++)
        check(16'($urandom), 16'($urandom), ops[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
