// tb_dwc_comparator: error must be high exactly when the two words differ.
// Equal pairs, pairs differing in one bit (every position) and random pairs.
module tb_dwc_comparator;
  logic [15:0] y_op, y_dup;
  logic        error;
  int checks = 0, failures = 0;

  dwc_comparator #(.W(16)) dut (.y_op, .y_dup, .error);

  task automatic check(input logic [15:0] p, input logic [15:0] q);
    y_op = p; y_dup = q;
    #1;
    checks++;
    if (error !== (p != q)) begin
      failures++;
      $display("FAIL %h %h error=%b", p, q, error);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    for (int i = 0; i < 200; i++) begin
      v = 16'($urandom);
      check(v, v);
      check(v, v ^ (16'h1 << (i % 16)));
      check(v, 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
