// Ripple-carry adder.
//
// sum = a + b + cin over W bits, with the carry out of the top bit on cout.
// It is a chain of W full adders, each taking the carry of the one below,
// which is the compact adder the ALU uses for its add and subtract paths
// and for the final addition inside the Vedic multipliers.
// Ripple-carry adders for the add and subtract paths follow the design,
// which picks them for being compact; their reuse inside the multipliers
// is this design's choice.
// Purely combinational; the delay grows linearly with W.
module rca_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[W];

endmodule
