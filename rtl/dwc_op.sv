// dwc_op: a basic operation protected by duplication with comparison.
//
// The operation block computes y from a and b; a second, identical block
// computes the same function from the same operands, and a comparator
// raises error when the two results differ. The result of the first block
// is the one passed on, so a fault in it propagates through the datapath
// while error flags it in the same cycle.
//
// For evaluating the scheme a fault can be injected into one operand of the
// first block only (fi_en, fi_operand, fi_mode, fi_vec; see fault_inject),
// which is where faults enter the operation in the scheme's evaluation. With
// DWC = 0 the duplicate and comparator are left out and error is 0.
// Combinational.
module dwc_op
  import haf_pkg::*;
#(
  parameter haf_op_e     OP   = OP_ADD,
  parameter int unsigned W    = 16,
  parameter logic [W:0]  POLY = 17'h1100B,
  parameter bit          DWC  = 1'b1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         fi_en,
  input  logic         fi_operand,
  input  fi_mode_e     fi_mode,
  input  logic [W-1:0] fi_vec,
  output logic [W-1:0] y,
  output logic         error
);
  logic [W-1:0] a_f, b_f, y_dup;

  fault_inject #(.W(W)) u_fia (.x(a), .en(fi_en && !fi_operand), .mode(fi_mode), .e(fi_vec), .xe(a_f));
  fault_inject #(.W(W)) u_fib (.x(b), .en(fi_en &&  fi_operand), .mode(fi_mode), .e(fi_vec), .xe(b_f));

  haf_op #(.OP(OP), .W(W), .POLY(POLY)) u_op (.a(a_f), .b(b_f), .y(y));

  if (DWC) begin : g_dwc
    haf_op #(.OP(OP), .W(W), .POLY(POLY)) u_dup (.a(a), .b(b), .y(y_dup));
    dwc_comparator #(.W(W)) u_cmp (.y_op(y), .y_dup(y_dup), .error(error));
  end else begin : g_nodwc
    assign y_dup = y;
    assign error = 1'b0;
  end
endmodule
