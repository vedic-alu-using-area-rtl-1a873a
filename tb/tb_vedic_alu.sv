// End-to-end self-checking testbench for vedic_alu at its default size.
//
// First replays the operand/select/result sequence of the design's
// reference waveform (three multiplies, three subtractions and an
// addition), then runs 50000 random operand pairs through every one of
// the eight operations and compares z1, z2 and fcry with a reference
// model written with the simulator's own operators. It counts how often
// each operation ran, how often an addition produced a carry and a
// subtraction a borrow, and how often a product reached the high half
// z2; a mechanism that never happened counts as a failure.
// Combinational: each vector is held for 1 ns before it is checked.
// A watchdog ends the run with a failure if it has not finished in time.
module tb_vedic_alu;
  import alu_pkg::*;

  logic [15:0] x, y, z1, z2;
  logic [2:0]  sel;
  logic        fcry;
  int checks = 0, failures = 0;
  int op_count [8];
  int add_carries = 0, sub_borrows = 0, high_products = 0;

  vedic_alu dut (.x(x), .y(y), .sel(sel), .z1(z1), .z2(z2), .fcry(fcry));

  // Reference model of the ALU.
  function automatic logic [32:0] model(input logic [15:0] a, input logic [15:0] b,
                                        input logic [2:0] s);
    logic [31:0] prod;
    logic [16:0] sum;
    prod = 32'(a) * 32'(b);
    sum  = 17'(a) + 17'(b);
    case (alu_op_e'(s))
      OP_AND: return {1'b0, 16'h0, a & b};
      OP_OR:  return {1'b0, 16'h0, a | b};
      OP_XOR: return {1'b0, 16'h0, a ^ b};
      OP_SHL: return {1'b0, 16'h0, a << b[3:0]};
      OP_SHR: return {1'b0, 16'h0, a >> b[3:0]};
      OP_MUL: return {1'b0, prod};
      OP_ADD: return {sum[16], 16'h0, sum[15:0]};
      default: return {b < a, 16'h0, 16'(b - a)};   // OP_SUB
    endcase
  endfunction

  task automatic apply(input logic [15:0] a, input logic [15:0] b, input logic [2:0] s);
    logic [32:0] m;
    x = a; y = b; sel = s;
    #1;
    m = model(a, b, s);
    checks++;
    op_count[s]++;
    if (alu_op_e'(s) == OP_ADD && fcry) add_carries++;
    if (alu_op_e'(s) == OP_SUB && fcry) sub_borrows++;
    if (alu_op_e'(s) == OP_MUL && z2 != 16'h0) high_products++;
    if ({fcry, z2, z1} !== m) begin
      failures++;
      if (failures < 10)
        $display("FAIL sel=%0d x=%h y=%h: fcry=%b z2=%h z1=%h, expected %b %h %h",
                 s, a, b, fcry, z2, z1, m[32], m[31:16], m[15:0]);
    end
  endtask

  // Checks one vector against values read off the reference waveform.
  task automatic apply_known(input logic [15:0] a, input logic [15:0] b, input logic [2:0] s,
                             input logic [15:0] exp_z1, input logic [15:0] exp_z2);
    apply(a, b, s);
    checks++;
    if (z1 !== exp_z1 || z2 !== exp_z2) begin
      failures++;
      $display("FAIL waveform vector sel=%0d x=%h y=%h: z2=%h z1=%h, expected %h %h",
               s, a, b, z2, z1, exp_z2, exp_z1);
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
    foreach (op_count[i]) op_count[i] = 0;

    // Reference waveform sequence.
    apply_known(16'h0000, 16'h0000, 3'd0, 16'h0000, 16'h0000);
    apply_known(16'h8888, 16'h1234, 3'd5, 16'h4ba0, 16'h09b5);
    apply_known(16'ha00b, 16'h0123, 3'd5, 16'hec81, 16'h00b5);
    apply_known(16'h89ab, 16'h1245, 3'd5, 16'h2117, 16'h09d3);
    apply_known(16'h1234, 16'h8888, 3'd7, 16'h7654, 16'h0000);
    apply_known(16'h0123, 16'ha007, 3'd7, 16'h9ee4, 16'h0000);
    apply_known(16'h1cc7, 16'habcd, 3'd7, 16'h8f06, 16'h0000);
    apply_known(16'h8888, 16'h1234, 3'd6, 16'h9abc, 16'h0000);

    // Corners: carry out of the adder, borrow of the subtractor, largest product.
    apply(16'hffff, 16'h0001, 3'd6);
    apply(16'h0001, 16'h0000, 3'd7);
    apply(16'hffff, 16'hffff, 3'd5);

    for (int n = 0; n < 50000; n++)
      for (int s = 0; s < 8; s++)
        apply(16'($urandom), 16'($urandom), 3'(s));

    for (int s = 0; s < 8; s++) begin
      checks++;
      if (op_count[s] == 0) begin
        failures++;
        $display("FAIL operation %0d never ran", s);
      end
    end
    checks += 3;
    if (add_carries == 0)   begin failures++; $display("FAIL no addition carried out"); end
    if (sub_borrows == 0)   begin failures++; $display("FAIL no subtraction borrowed"); end
    if (high_products == 0) begin failures++; $display("FAIL no product reached z2"); end
    $display("operations run: and %0d or %0d xor %0d shl %0d shr %0d mul %0d add %0d sub %0d",
             op_count[0], op_count[1], op_count[2], op_count[3], op_count[4],
             op_count[5], op_count[6], op_count[7]);
    $display("add carries %0d, sub borrows %0d, products into z2 %0d",
             add_carries, sub_borrows, high_products);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
