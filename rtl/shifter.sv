// Logical barrel shifter.
//
// Shifts data left (right = 0) or right (right = 1) by amt places, filling
// with zeros. It is built as log2(W) stages; stage s shifts by 2**s when
// bit s of amt is set.
// The design names a shifter but does not define it; the logical shift,
// the shift-amount width and the barrel structure are this design's choices.
// Purely combinational.
module shifter #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = $clog2(W)
) (
  input  logic [W-1:0]  data,
  input  logic [AW-1:0] amt,
  input  logic          right,
  output logic [W-1:0]  result
);

  logic [W-1:0] stage [AW+1];

  assign stage[0] = data;

  for (genvar s = 0; s < AW; s++) begin : g_stage
    assign stage[s+1] = !amt[s] ? stage[s]
                      : right   ? stage[s] >> (2 ** s)
                      :           stage[s] << (2 ** s);
  end

  assign result = stage[AW];

endmodule
