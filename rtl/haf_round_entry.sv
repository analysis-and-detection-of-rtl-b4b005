// haf_round_entry: the input stage of a HaF-256 round.
//
// The 4 least significant bits of the 256-bit string N give a rotation
// amount t; N is rotated left by t bits, giving the round output N*, and
// N* is XORed into H to give the round's working value, which the steps
// then treat as sixteen 16-bit words. Both rounds of a block use this
// stage: round 1 with N = M xor salt and H = chaining value, round 2 with
// the two strings swapped (N = H*, H = N*). Combinational.
module haf_round_entry
  import haf_pkg::*;
#(
  parameter int unsigned BITS = HAF_BITS
) (
  input  logic [BITS-1:0] n_in,
  input  logic [BITS-1:0] h_in,
  output logic [BITS-1:0] n_star,
  output logic [BITS-1:0] h_mix
);
  logic [3:0] t;

  always_comb begin
    t      = n_in[3:0];
    // a shift by BITS (t = 0) yields all zeros, leaving n_in unrotated
    n_star = (n_in << t) | (n_in >> (BITS - int'(t)));
    h_mix  = h_in ^ n_star;
  end
endmodule
