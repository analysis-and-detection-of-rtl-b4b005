// haf_xor: addition modulo 2 of two W-bit words, bit by bit (the circled
// plus of the step function). Purely combinational, no latency.
module haf_xor #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb y = a ^ b;
endmodule
