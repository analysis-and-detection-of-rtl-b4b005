// haf_gfmul: multiplication of two polynomials over GF(2) of degree < W,
// reduced modulo the irreducible polynomial POLY = R(x) (bit W set).
//
// The carry-less product of degree up to 2W-2 is formed first, then the
// terms of degree W and above are cancelled from the top down by XORing
// shifted copies of R(x). The step function uses it with one operand a
// constant polynomial alpha_k. R(x) itself is not published with the
// algorithm; the default x^16+x^12+x^3+x+1 is this design's choice.
// Combinational, no latency.
module haf_gfmul #(
  parameter int unsigned W    = 16,
  parameter logic [W:0]  POLY = 17'h1100B
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  logic [2*W-2:0] prod;

  always_comb begin
    prod = '0;
    for (int i = 0; i < W; i++)
      if (b[i]) prod ^= (2*W-1)'(a) << i;
    for (int i = 2*W-2; i >= int'(W); i--)
      if (prod[i]) prod ^= (2*W-1)'(POLY) << (i - W);
    y = prod[W-1:0];
  end
endmodule
