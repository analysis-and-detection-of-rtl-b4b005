// tb_haf_mulmod: self-checking test of haf_mulmod (multiplication mod 2^16+1, zero word = 2^16). Drives corner operands and
// 20000 random pairs and compares y with an independent reference
// (haf_ref_pkg). Combinational block: checked 1 time unit after each input.
module tb_haf_mulmod;
  import haf_ref_pkg::*;
  logic [15:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  haf_mulmod #(.W(16)) dut (.a, .b, .y);

  task automatic check(input logic [15:0] ta, input logic [15:0] tb_);
    a = ta; b = tb_;
    #1;
    exp_y = ref_mulmod(a, b);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h y=%h expected %h", a, b, y, exp_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000, 16'h0000); check(16'h0000, 16'h0001); check(16'h0001, 16'h0000);
    check(16'hFFFF, 16'hFFFF); check(16'hFFFF, 16'h0001); check(16'h8000, 16'h8000);
    check(16'h0000, 16'hFFFF); check(16'h1234, 16'h0001); check(16'h0002, 16'h8000);
    for (int i = 0; i < 20000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
