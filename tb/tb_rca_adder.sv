// Self-checking testbench for rca_adder at its default width of 16 bits.
// Checks carry-propagation corners and 100000 random operand and carry-in
// combinations against a 17-bit sum computed by the simulator, and
// counts how often a carry out occurred. Combinational: each vector is
// held for 1 ns. A watchdog ends the run with a failure if it has not
// finished in time.
module tb_rca_adder;

  logic [15:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0, carries = 0;

  rca_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(input logic [15:0] x, input logic [15:0] y, input logic ci);
    logic [16:0] model;
    a = x; b = y; cin = ci;
    #1;
    model = 17'(x) + 17'(y) + 17'(ci);
    checks++;
    if (cout) carries++;
    if ({cout, sum} !== model) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b = %b%h, expected %h", x, y, ci, cout, sum, model);
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
    check(16'h8888, 16'h1234, 1'b0);   // reference waveform: 9abc
    check(16'hffff, 16'h0000, 1'b1);   // carry ripples through every bit
    check(16'hffff, 16'hffff, 1'b1);
    check(16'h0000, 16'h0000, 1'b0);
    check(16'h8000, 16'h8000, 1'b0);
    for (int n = 0; n < 100000; n++)
      check(16'($urandom), 16'($urandom), 1'($urandom));
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL no carry out was ever produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
