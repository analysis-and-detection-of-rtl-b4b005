// dwc_comparator: the comparator ("errcheck") of duplication with
// comparison. error is high whenever the output of an operation block and
// that of its duplicate differ in any bit. Combinational.
module dwc_comparator #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] y_op,
  input  logic [W-1:0] y_dup,
  output logic         error
);
  always_comb error = |(y_op ^ y_dup);
endmodule
