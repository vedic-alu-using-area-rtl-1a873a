// Subtractor: diff = minuend - subtrahend over W bits.
//
// The subtrahend is inverted and added to the minuend on a ripple-carry
// adder with a carry in of one (two's complement). The adder's carry out
// is one when no borrow occurs, so borrow is its inverse: borrow is one
// exactly when minuend < subtrahend as unsigned numbers.
// A subtractor on a ripple-carry adder follows the design; the borrow
// output and its polarity are this design's choice.
// Purely combinational.
module subtractor #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] minuend,
  input  logic [W-1:0] subtrahend,
  output logic [W-1:0] diff,
  output logic         borrow
);

  logic cout;

  rca_adder #(.W(W)) u_rca (
    .a    (minuend),
    .b    (~subtrahend),
    .cin  (1'b1),
    .sum  (diff),
    .cout (cout)
  );

  assign borrow = ~cout;

endmodule
