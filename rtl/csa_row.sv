// One row of carry-save adders (3:2 compressors).
//
// Reduces three W-bit words to a sum word and a carry word with
// a + b + c == sum + (carry << 1), without any carry propagation:
// every bit position is an independent full adder. The carry word is
// returned unshifted; the caller weights it by two.
// The design lists carry-save addition among its techniques without
// placing it; using one row to join the multipliers' partial products is
// this design's choice.
// Purely combinational, one full-adder delay.
module csa_row #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (a & c) | (b & c);

endmodule
