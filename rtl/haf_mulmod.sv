// haf_mulmod: multiplication modulo 2^W + 1 of two W-bit words.
//
// The operands are non-zero integers 1..2^W, and as in IDEA-type ciphers the
// all-zero word stands for 2^W (this encoding is a choice of this design;
// it makes the operation a bijection in each operand when 2^W + 1 is prime,
// as it is for W = 16). The 2W+2-bit product p is reduced with the identity
// 2^W = -1 (mod 2^W+1): p mod (2^W+1) = lo - hi, corrected by +2^W+1 when
// negative, where lo and hi are the low and high W bits of p. Kept to W
// bits, the correction is a +1 on the wrapped difference, and a result of
// 2^W comes out as the zero word by itself. The only product that does not
// fit in 2W bits, 2^W * 2^W, gives 1. Combinational, no latency.
module haf_mulmod #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  logic [W:0]     aa, bb;
  logic [2*W+1:0] p;
  logic [W-1:0]   lo, hi;

  always_comb begin
    aa = {a == '0, a};
    bb = {b == '0, b};
    p  = {{(W+1){1'b0}}, aa} * {{(W+1){1'b0}}, bb};
    lo = p[W-1:0];
    hi = p[2*W-1:W];
    if (p[2*W])
      y = W'(1);
    else if (lo >= hi)
      y = lo - hi;
    else
      y = lo - hi + W'(1);
  end
endmodule
