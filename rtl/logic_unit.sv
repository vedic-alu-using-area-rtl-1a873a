// Bitwise logic unit: AND, OR or XOR of two W-bit words.
//
// The design names a block of logical gates without listing its
// operations; the three operations chosen here are this design's own.
// Purely combinational.
module logic_unit
  import alu_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic_op_e    op,
  output logic [W-1:0] result
);

  always_comb begin
    unique case (op)
      LOG_AND: result = a & b;
      LOG_OR:  result = a | b;
      LOG_XOR: result = a ^ b;
      default: result = '0;
    endcase
  end

endmodule
