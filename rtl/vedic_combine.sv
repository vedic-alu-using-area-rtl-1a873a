// Addition stage that joins four half-width products into one product.
//
// For operands split into high and low halves of H bits,
//   a * b = (aH*bH << 2H) + (aH*bL << H) + (aL*bH << H) + aL*bL.
// The low H bits of aL*bL are already final. The remaining 3H bits are the
// sum of three words: aH*bL, aL*bH, and aH*bH placed above the high half of
// aL*bL. A row of carry-save adders reduces the three words to two, and a
// ripple-carry adder adds those. The sum always fits in 3H bits because the
// full product fits in 4H bits.
//
// This is the step by which the 8x8 multiplier is built from 4x4 blocks and
// the 16x16 multiplier from 8x8 blocks. The carry-save-then-ripple adder
// arrangement is this design's choice.
//
// Interface: the four 2H-bit partial products in, the 4H-bit product out.
// Purely combinational.
module vedic_combine #(
  parameter int unsigned H = 4
) (
  input  logic [2*H-1:0] q_ll,   // aL * bL
  input  logic [2*H-1:0] q_hl,   // aH * bL
  input  logic [2*H-1:0] q_lh,   // aL * bH
  input  logic [2*H-1:0] q_hh,   // aH * bH
  output logic [4*H-1:0] p
);

  localparam int unsigned UW = 3 * H;

  logic [UW-1:0] w0, w1, w2;
  logic [UW-1:0] cs_sum, cs_carry;
  logic [UW-1:0] upper;
  logic          unused_cout;

  assign w0 = {{H{1'b0}}, q_hl};
  assign w1 = {{H{1'b0}}, q_lh};
  assign w2 = {q_hh, q_ll[2*H-1:H]};

  csa_row #(.W(UW)) u_csa (
    .a     (w0),
    .b     (w1),
    .c     (w2),
    .sum   (cs_sum),
    .carry (cs_carry)
  );

  // The top bit of the carry word would land outside the 3H-bit result;
  // it is always zero because the product fits in 4H bits, so it is left
  // unused (lint reports it as an unused bit).
  rca_adder #(.W(UW)) u_rca (
    .a    (cs_sum),
    .b    ({cs_carry[UW-2:0], 1'b0}),
    .cin  (1'b0),
    .sum  (upper),
    .cout (unused_cout)
  );

  assign p = {upper, q_ll[H-1:0]};

endmodule
