// ca_rule90: one step of the rule-90 cellular automaton over a W-bit cyclic grid.
//
// Every cell of the next vector is the XOR of its left and right neighbours in the
// current vector, which is the same as XORing the vector rotated by +1 with the vector
// rotated by -1. The grid wraps around, so the first and last cells are neighbours.
// Purely combinational. Iterating it from a seed yields a sequence of pseudo-orthogonal
// vectors, which the HV generator uses as channel identifiers instead of storing them.
// The rule and the two rotations follow the source architecture; the wrap-around
// boundary is this design's reading of the rotations.
module ca_rule90 #(
  parameter int unsigned W = 500
) (
  input  logic [W-1:0] cur,
  output logic [W-1:0] nxt
);

  logic [W-1:0] rot_l;  // rot_l[i] = cur[i-1]
  logic [W-1:0] rot_r;  // rot_r[i] = cur[i+1]

  always_comb begin
    rot_l = {cur[W-2:0], cur[W-1]};
    rot_r = {cur[0], cur[W-1:1]};
    nxt   = rot_l ^ rot_r;
  end

endmodule
