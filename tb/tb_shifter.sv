// Self-checking testbench for shifter at its default width of 16 bits.
// Checks every shift amount in both directions on walking-one and random
// data against the simulator's own shift operators. Combinational: each
// vector is held for 1 ns. A watchdog ends the run with a failure if it
// has not finished in time.
module tb_shifter;

  logic [15:0] data, result;
  logic [3:0]  amt;
  logic        right;
  int checks = 0, failures = 0;

  shifter dut (.data(data), .amt(amt), .right(right), .result(result));

  task automatic check(input logic [15:0] x, input logic [3:0] n, input logic r);
    logic [15:0] model;
    data = x; amt = n; right = r;
    #1;
    model = r ? (x >> n) : (x << n);
    checks++;
    if (result !== model) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %0d = %h, expected %h", x, r ? ">>" : "<<", n, result, model);
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
    for (int r = 0; r < 2; r++)
      for (int n = 0; n < 16; n++) begin
        check(16'h0001, 4'(n), 1'(r));
        check(16'h8000, 4'(n), 1'(r));
        check(16'hffff, 4'(n), 1'(r));
      end
    for (int k = 0; k < 20000; k++)
      check(16'($urandom), 4'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
