// 8x8 unsigned Vedic multiplier built from four 4x4 Vedic multipliers.
//
// The operands are split into 4-bit halves. Four vedic_mul4 blocks form
// aL*bL, aH*bL, aL*bH and aH*bH at the same time, the vertical and
// crosswise products of the Urdhva Tiryambakam method applied to the
// halves, and a vedic_combine stage adds them with their weights
// (carry-save row, then ripple-carry adder) into the 16-bit product.
//
// Building the 8x8 multiplier from 4x4 blocks follows the design;
// the adder arrangement inside the combining stage is this design's choice.
//
// Interface: a, b (8 bits each) in, p (16 bits) out. Purely
// combinational.
module vedic_mul8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p
);

  localparam int unsigned H = 4;

  logic [2*H-1:0] q_ll, q_hl, q_lh, q_hh;

  vedic_mul4 u_ll (.a(a[H-1:0]),   .b(b[H-1:0]),   .p(q_ll));
  vedic_mul4 u_hl (.a(a[2*H-1:H]), .b(b[H-1:0]),   .p(q_hl));
  vedic_mul4 u_lh (.a(a[H-1:0]),   .b(b[2*H-1:H]), .p(q_lh));
  vedic_mul4 u_hh (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .p(q_hh));

  vedic_combine #(.H(H)) u_combine (
    .q_ll (q_ll),
    .q_hl (q_hl),
    .q_lh (q_lh),
    .q_hh (q_hh),
    .p    (p)
  );

endmodule
