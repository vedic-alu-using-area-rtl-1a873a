// Self-checking testbench for vedic_mul4.
// Applies all 256 operand pairs and compares the product with a * b
// computed by the simulator's own multiply. Combinational: each vector is
// held for 1 ns before it is checked. A watchdog ends the run with a
// failure if it has not finished in time.
module tb_vedic_mul4;

  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_mul4 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, expected %0d", i, j, p, i * j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
