// 16-bit ALU around an area-optimised Urdhva Tiryambakam multiplier.
//
// Two 16-bit operands x and y feed five units side by side: the 16x16
// Vedic multiplier, a ripple-carry adder, a subtractor, a shifter and a
// bitwise logic unit. The 3-bit select sel chooses which unit drives the
// outputs:
//   sel 5  multiply  {z2, z1} = x * y (32-bit unsigned product)
//   sel 6  add       z1 = x + y,  fcry = carry out
//   sel 7  subtract  z1 = y - x,  fcry = borrow (1 when y < x)
//   sel 0  z1 = x & y      sel 1  z1 = x | y      sel 2  z1 = x ^ y
//   sel 3  z1 = x << y[3:0]       sel 4  z1 = x >> y[3:0] (logical)
// z2 is zero and fcry is zero for every operation that does not define
// them.
//
// The port list (x, y, sel, z1, z2, fcry: 68 pins in all), the codes of
// multiply, add and subtract, the product split across z2:z1 and the
// operand order of the subtraction follow the design's reference
// waveform. The codes and operations of the logic and shift units, the
// shift amount taken from y[3:0], the meaning of fcry for subtraction and
// the zero values of z2 and fcry on other operations are this design's
// choices.
//
// Timing: purely combinational, no clock; outputs settle one worst-case
// multiplier delay after the inputs change.
module vedic_alu
  import alu_pkg::*;
(
  input  logic [15:0] x,
  input  logic [15:0] y,
  input  logic [2:0]  sel,
  output logic [15:0] z1,
  output logic [15:0] z2,
  output logic        fcry
);

  localparam int unsigned W = ALU_WIDTH;

  alu_op_e   op;
  logic_op_e lop;

  logic [2*W-1:0] product;
  logic [W-1:0]   add_sum, sub_diff, shift_res, logic_res;
  logic           add_cout, sub_borrow;

  assign op = alu_op_e'(sel);

  vedic_mul16 u_mul (
    .a (x),
    .b (y),
    .p (product)
  );

  rca_adder #(.W(W)) u_add (
    .a    (x),
    .b    (y),
    .cin  (1'b0),
    .sum  (add_sum),
    .cout (add_cout)
  );

  subtractor #(.W(W)) u_sub (
    .minuend    (y),
    .subtrahend (x),
    .diff       (sub_diff),
    .borrow     (sub_borrow)
  );

  shifter #(.W(W)) u_shift (
    .data   (x),
    .amt    (y[3:0]),
    .right  (op == OP_SHR),
    .result (shift_res)
  );

  always_comb begin
    unique case (op)
      OP_OR:   lop = LOG_OR;
      OP_XOR:  lop = LOG_XOR;
      default: lop = LOG_AND;
    endcase
  end

  logic_unit #(.W(W)) u_logic (
    .a      (x),
    .b      (y),
    .op     (lop),
    .result (logic_res)
  );

  always_comb begin
    z1   = '0;
    z2   = '0;
    fcry = 1'b0;
    unique case (op)
      OP_AND, OP_OR, OP_XOR: z1 = logic_res;
      OP_SHL, OP_SHR:        z1 = shift_res;
      OP_MUL: begin
        z1 = product[W-1:0];
        z2 = product[2*W-1:W];
      end
      OP_ADD: begin
        z1   = add_sum;
        fcry = add_cout;
      end
      OP_SUB: begin
        z1   = sub_diff;
        fcry = sub_borrow;
      end
      default: ;
    endcase
  end

endmodule
