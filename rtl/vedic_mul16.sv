// 16x16 unsigned Vedic multiplier built from four 8x8 Vedic multipliers.
//
// The operands are split into 8-bit halves. Four vedic_mul8 blocks form
// aL*bL, aH*bL, aL*bH and aH*bH at the same time, the vertical and
// crosswise products of the Urdhva Tiryambakam method applied to the
// halves, and a vedic_combine stage adds them with their weights
// (carry-save row, then ripple-carry adder) into the 32-bit product.
//
// Building the 16x16 multiplier from 8x8 blocks follows the design;
// the adder arrangement inside the combining stage is this design's choice.
//
// Interface: a, b (16 bits each) in, p (32 bits) out. Purely
// combinational.
module vedic_mul16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);

  localparam int unsigned H = 8;

  logic [2*H-1:0] q_ll, q_hl, q_lh, q_hh;

  vedic_mul8 u_ll (.a(a[H-1:0]),   .b(b[H-1:0]),   .p(q_ll));
  vedic_mul8 u_hl (.a(a[2*H-1:H]), .b(b[H-1:0]),   .p(q_hl));
  vedic_mul8 u_lh (.a(a[H-1:0]),   .b(b[2*H-1:H]), .p(q_lh));
  vedic_mul8 u_hh (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .p(q_hh));

  vedic_combine #(.H(H)) u_combine (
    .q_ll (q_ll),
    .q_hl (q_hl),
    .q_lh (q_lh),
    .q_hh (q_hh),
    .p    (p)
  );

endmodule
