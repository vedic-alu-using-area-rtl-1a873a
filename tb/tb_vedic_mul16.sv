// Self-checking testbench for vedic_mul16.
// Checks the three multiplications of the reference waveform, corner
// operands (0, 1, all ones, single bits) and 200000 random pairs against
// a 64-bit product computed by the simulator. Combinational: each vector
// is held for 1 ns. A watchdog ends the run with a failure if it has not
// finished in time.
module tb_vedic_mul16;

  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  vedic_mul16 dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [15:0] x, input logic [15:0] y,
                       input logic [31:0] expected);
    logic [63:0] model;
    a = x;
    b = y;
    #1;
    model = 64'(x) * 64'(y);
    checks++;
    if (p !== expected || p !== model[31:0]) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h * %h = %h, expected %h", x, y, p, expected);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] x, y;
    // Products printed in the reference waveform (high half : low half).
    check(16'h8888, 16'h1234, 32'h09b5_4ba0);
    check(16'ha00b, 16'h0123, 32'h00b5_ec81);
    check(16'h89ab, 16'h1245, 32'h09d3_2117);
    check(16'h0000, 16'h0000, 32'h0);
    check(16'hffff, 16'hffff, 32'hfffe_0001);
    check(16'hffff, 16'h0001, 32'h0000_ffff);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        check(16'(1 << i), 16'(1 << j), 32'(64'(1) << (i + j)));
    for (int n = 0; n < 200000; n++) begin
      x = 16'($urandom);
      y = 16'($urandom);
      check(x, y, 32'(x) * 32'(y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
