// Self-checking testbench for subtractor at its default width of 16 bits.
// Checks the three subtractions of the reference waveform, equal and
// borrowing operands, and 100000 random pairs against the simulator's own
// difference and unsigned comparison. Combinational: each vector is held
// for 1 ns. A watchdog ends the run with a failure if it has not finished
// in time.
module tb_subtractor;

  logic [15:0] m, s, d;
  logic        borrow;
  int checks = 0, failures = 0, borrows = 0;

  subtractor dut (.minuend(m), .subtrahend(s), .diff(d), .borrow(borrow));

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [15:0] model;
    m = x; s = y;
    #1;
    model = x - y;
    checks++;
    if (borrow) borrows++;
    if (d !== model || borrow !== (x < y)) begin
      failures++;
      if (failures < 10) $display("FAIL %h - %h = %h borrow %b", x, y, d, borrow);
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
    check(16'h8888, 16'h1234);   // reference waveform: 7654
    check(16'ha007, 16'h0123);   // 9ee4
    check(16'habcd, 16'h1cc7);   // 8f06
    check(16'h1234, 16'h1234);
    check(16'h0000, 16'h0001);
    check(16'h0000, 16'hffff);
    for (int n = 0; n < 100000; n++)
      check(16'($urandom), 16'($urandom));
    checks++;
    if (borrows == 0) begin
      failures++;
      $display("FAIL no borrow was ever produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
