// haf_add: addition modulo 2^W of two W-bit words (the boxed-plus
// operation of the step function). Purely combinational, no latency.
module haf_add #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb y = a + b;   // carry out of bit W-1 is dropped: mod 2^W
endmodule
