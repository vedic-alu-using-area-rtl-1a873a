// 4x4 unsigned Urdhva Tiryambakam ("vertically and crosswise") multiplier.
//
// The product is formed in seven steps, one per product column k = 0..6.
// Step k takes every bit product a[i] & b[j] with i + j = k: the vertical
// product a0.b0 in step 1, the crosswise pairs a1.b0 and a0.b1 in step 2,
// three products in step 3, four in step 4, then three, two and finally
// the vertical a3.b3 in step 7. All sixteen bit products are formed at
// once. Each step adds its bit products and the carry word left by the
// step before; the low bit of that sum is product bit k and the rest is
// carried into step k+1. The carry out of step 7 is product bit 7.
//
// The step structure follows the Urdhva Tiryambakam method. How each
// step's small sum is built is this design's choice: a column count added
// to the previous carry, with the widths sized to the largest value each
// step can reach (3 bits).
//
// Interface: a, b (4 bits each) in, p (8 bits) out. Purely combinational.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  localparam int unsigned N     = 4;
  localparam int unsigned STEPS = 2 * N - 1;

  // carry holds the carry word passed from one step to the next; sum is
  // the current step's total of bit products plus that carry.
  always_comb begin
    logic [2:0] carry;
    logic [2:0] sum;
    carry = 3'd0;
    for (int k = 0; k < STEPS; k++) begin
      sum = carry;
      for (int i = 0; i < N; i++) begin
        if (k - i >= 0 && k - i < N) begin
          sum = sum + {2'b00, a[i] & b[k-i]};
        end
      end
      p[k]  = sum[0];
      carry = {1'b0, sum[2:1]};
    end
    p[STEPS] = carry[0];
  end

endmodule
