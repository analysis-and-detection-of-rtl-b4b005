// tb_haf_sbox: S_j for all sixteen steps. For every j the substitution
// must be a bijection on 16-bit words (checked on all 65536 inputs with a
// seen-bitmap) and agree with the nibble-wise reference.
module tb_haf_sbox;
  import haf_ref_pkg::*;
  logic [3:0]  j;
  logic [15:0] x, y;
  bit          seen [65536];
  int checks = 0, failures = 0;

  haf_sbox dut (.j, .x, .y);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dup;
    for (int jj = 0; jj < 16; jj++) begin
      j = 4'(jj);
      foreach (seen[i]) seen[i] = 1'b0;
      dup = 0;
      for (int v = 0; v < 65536; v++) begin
        x = 16'(v);
        #1;
        if (seen[y]) dup++;
        seen[y] = 1'b1;
        if (v % 64 == 0) begin
          checks++;
          if (y !== ref_sbox(jj, x)) begin
            failures++;
            if (failures < 10) $display("FAIL j=%0d x=%h y=%h exp=%h", jj, x, y, ref_sbox(jj, x));
          end
        end
      end
      checks++;
      if (dup != 0) begin
        failures++;
        $display("FAIL j=%0d not a bijection (%0d collisions)", jj, dup);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
