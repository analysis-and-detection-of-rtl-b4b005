// haf_sbox: the substitution S_j of step j, built from four 4-bit S-boxes
// S0..S3 (tables in haf_pkg).
//
// The 16-bit word is cut into four nibbles; nibble k (k = 0 is the least
// significant) goes through S-box S_((j + k) mod 4), so the assignment of
// boxes to nibbles turns with the step number. The algorithm names S_j and
// its four boxes but its tables and the way a box is chosen are not
// published with it: the nibble split, the rotation of the assignment and
// the table contents are this design's choices. Every box is a permutation,
// so S_j is a bijection. Combinational.
module haf_sbox
  import haf_pkg::*;
(
  input  logic [3:0]  j,
  input  logic [15:0] x,
  output logic [15:0] y
);
  always_comb begin
    for (int k = 0; k < 4; k++)
      y[4*k +: 4] = haf_sbox4((int'(j) + k) % 4, x[4*k +: 4]);
  end
endmodule
