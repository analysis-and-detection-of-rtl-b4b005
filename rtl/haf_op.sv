// haf_op: one basic operation of the step function, chosen at elaboration
// time by OP (addition mod 2^W, XOR, multiplication mod 2^W+1 or
// multiplication mod R(x)). It lets the duplication-with-comparison wrapper
// instantiate the same operation block twice. Combinational.
module haf_op
  import haf_pkg::*;
#(
  parameter haf_op_e     OP   = OP_ADD,
  parameter int unsigned W    = 16,
  parameter logic [W:0]  POLY = 17'h1100B
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  if (OP == OP_ADD) begin : g_add
    haf_add #(.W(W)) u_op (.a, .b, .y);
  end else if (OP == OP_XOR) begin : g_xor
    haf_xor #(.W(W)) u_op (.a, .b, .y);
  end else if (OP == OP_MULMOD) begin : g_mulmod
    haf_mulmod #(.W(W)) u_op (.a, .b, .y);
  end else begin : g_gfmul
    haf_gfmul #(.W(W), .POLY(POLY)) u_op (.a, .b, .y);
  end
endmodule
