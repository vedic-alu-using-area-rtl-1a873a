// Shared types of the 16-bit Vedic ALU.
//
// alu_op_e is the 3-bit operation select of the ALU. Three of its codes
// are fixed by the reference waveform of the design: 5 multiplies, 6 adds
// and 7 subtracts. The codes 0 to 4, which drive the bitwise logic unit and
// the shifter, are this design's own assignment.
// logic_op_e selects the operation inside the logic unit.
package alu_pkg;

  localparam int unsigned ALU_WIDTH = 16;

  typedef enum logic [2:0] {
    OP_AND = 3'd0,
    OP_OR  = 3'd1,
    OP_XOR = 3'd2,
    OP_SHL = 3'd3,
    OP_SHR = 3'd4,
    OP_MUL = 3'd5,
    OP_ADD = 3'd6,
    OP_SUB = 3'd7
  } alu_op_e;

  typedef enum logic [1:0] {
    LOG_AND = 2'd0,
    LOG_OR  = 2'd1,
    LOG_XOR = 2'd2
  } logic_op_e;

endpackage
