// fault_inject: applies an error vector e to a W-bit word x, following the
// fault models used to evaluate the error detection: with mode FI_FLIP the
// marked bits are inverted (xe = x xor e), with FI_SA1 they are forced to 1
// (xe = x or e), with FI_SA0 forced to 0 (xe = x and not e). When en is low
// the word passes unchanged. A permanent fault is en held high, a
// transient one en high for a single clock cycle. Combinational.
module fault_inject
  import haf_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic         en,
  input  fi_mode_e     mode,
  input  logic [W-1:0] e,
  output logic [W-1:0] xe
);
  always_comb begin
    if (!en)
      xe = x;
    else
      unique case (mode)
        FI_FLIP: xe = x ^ e;
        FI_SA1:  xe = x | e;
        FI_SA0:  xe = x & ~e;
        default: xe = x;
      endcase
  end
endmodule
