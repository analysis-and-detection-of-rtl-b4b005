// haf_step: one step F_j of the HaF-256 round function, with every basic
// operation protected by duplication with comparison.
//
// Inputs are the working variables A0..A15 (a[0] = A0 is the leftmost word
// of the 256-bit value) and the step number j. The new state is the old one
// moved down by one word (new A_r = A_(r+1)), except that A10 is rotated
// left by 7 bits on its way to position 9, and the new A15 is
//   X = alpha0(x)A0 ^ alpha2(x)A2 ^ alpha3(x)A3 ^ alpha5(x)A5
//   Y = ((A1 + A6) . (A5 ^ A7)) ^ A8
//   A15' = (S_j((A9 + A11 + A14) ^ (c <<< j)) + Y) ^ X
// with (x) multiplication mod R(x), . multiplication mod 2^n+1, + addition
// mod 2^n and ^ XOR. The wiring follows the published step diagram, and
// the shift and the 7-bit rotation agree with the published trace of a
// round; which operand taps feed the sum chain (A9, A11, A14) was read from
// the diagram. The constants come from haf_pkg and are placeholders.
//
// Each of the sixteen operations is a dwc_op: err_ops[k] is the comparator
// output of operation k (numbered as haf_stepop_e), err their OR. A fault
// described by fi is injected into one operand of the selected operation.
// Combinational: the owner registers a_out once per clock.
module haf_step
  import haf_pkg::*;
#(
  parameter int unsigned     W      = 16,
  parameter logic [W-1:0]    C      = HAF_C,
  parameter logic [W-1:0]    ALPHA0 = HAF_ALPHA0,
  parameter logic [W-1:0]    ALPHA2 = HAF_ALPHA2,
  parameter logic [W-1:0]    ALPHA3 = HAF_ALPHA3,
  parameter logic [W-1:0]    ALPHA5 = HAF_ALPHA5,
  parameter logic [W:0]      RPOLY  = HAF_RPOLY,
  parameter int unsigned     ROT10  = HAF_ROT10,
  parameter bit              DWC    = 1'b1
) (
  input  logic [3:0]             j,
  input  logic [0:15][W-1:0]     a_in,
  input  fault_t                 fi,
  output logic [0:15][W-1:0]     a_out,
  output logic [HAF_NOPS-1:0]    err_ops,
  output logic                   err
);
  // operand pairs and results of the sixteen operations
  logic [HAF_NOPS-1:0][W-1:0] opa, opb, res;
  logic [W-1:0] c_rot, s_out;

  always_comb begin
    c_rot = (j == 4'd0) ? C : W'((C << j) | (C >> (W - int'(j))));
  end

  always_comb begin
    opa[S_M0]  = ALPHA0;      opb[S_M0]  = a_in[0];
    opa[S_M2]  = ALPHA2;      opb[S_M2]  = a_in[2];
    opa[S_M3]  = ALPHA3;      opb[S_M3]  = a_in[3];
    opa[S_M5]  = ALPHA5;      opb[S_M5]  = a_in[5];
    opa[S_X02] = res[S_M0];   opb[S_X02] = res[S_M2];
    opa[S_X3]  = res[S_X02];  opb[S_X3]  = res[S_M3];
    opa[S_X5]  = res[S_X3];   opb[S_X5]  = res[S_M5];
    opa[S_A16] = a_in[1];     opb[S_A16] = a_in[6];
    opa[S_X57] = a_in[5];     opb[S_X57] = a_in[7];
    opa[S_MUL] = res[S_A16];  opb[S_MUL] = res[S_X57];
    opa[S_X8]  = res[S_MUL];  opb[S_X8]  = a_in[8];
    opa[S_A9B] = a_in[9];     opb[S_A9B] = a_in[11];
    opa[S_A14] = res[S_A9B];  opb[S_A14] = a_in[14];
    opa[S_XC]  = res[S_A14];  opb[S_XC]  = c_rot;
    opa[S_AS]  = s_out;       opb[S_AS]  = res[S_X8];
    opa[S_XF]  = res[S_AS];   opb[S_XF]  = res[S_X5];
  end

  haf_sbox u_sbox (.j(j), .x(res[S_XC]), .y(s_out));

  for (genvar k = 0; k < HAF_NOPS; k++) begin : g_op
    localparam haf_op_e KIND =
      (k <= int'(S_M5))                        ? OP_GFMUL  :
      (k == int'(S_MUL))                       ? OP_MULMOD :
      (k == int'(S_A16) || k == int'(S_A9B) ||
       k == int'(S_A14) || k == int'(S_AS))    ? OP_ADD    : OP_XOR;
    dwc_op #(.OP(KIND), .W(W), .POLY(RPOLY), .DWC(DWC)) u_op (
      .a(opa[k]), .b(opb[k]),
      .fi_en(fi.en && (fi.op == haf_stepop_e'(k))),
      .fi_operand(fi.operand), .fi_mode(fi.mode), .fi_vec(W'(fi.vec)),
      .y(res[k]), .error(err_ops[k]));
  end

  always_comb begin
    for (int r = 0; r < 15; r++) a_out[r] = a_in[r+1];
    a_out[9]  = W'((a_in[10] << ROT10) | (a_in[10] >> (W - ROT10)));
    a_out[15] = res[S_XF];
    err       = |err_ops;
  end
endmodule
