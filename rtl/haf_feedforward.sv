// haf_feedforward: the end of the compression of one block. Each 16-bit
// word of the value left by round 2 is added modulo 2^W to the word in the
// same position of the chaining value that entered round 1, giving the
// next chaining value H(i+1). Sixteen independent adders, combinational.
module haf_feedforward
  import haf_pkg::*;
#(
  parameter int unsigned W     = HAF_N,
  parameter int unsigned WORDS = HAF_WORDS
) (
  input  logic [0:WORDS-1][W-1:0] a,
  input  logic [0:WORDS-1][W-1:0] h_in,
  output logic [0:WORDS-1][W-1:0] h_out
);
  for (genvar r = 0; r < int'(WORDS); r++) begin : g_add
    haf_add #(.W(W)) u_add (.a(a[r]), .b(h_in[r]), .y(h_out[r]));
  end
endmodule
