// tb_haf_feedforward: each output word must be the sum mod 2^16 of the
// words in the same position, words numbered from the left (A0 first).
module tb_haf_feedforward;
  logic [0:15][15:0] a, h_in, h_out;
  int checks = 0, failures = 0;

  haf_feedforward #(.W(16), .WORDS(16)) dut (.a, .h_in, .h_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] fa, fh, fo;
    for (int i = 0; i < 500; i++) begin
      for (int r = 0; r < 16; r++) begin
        a[r] = 16'($urandom); h_in[r] = 16'($urandom);
      end
      if (i == 0) begin a = '1; h_in = {16{16'h0001}}; end   // all carries wrap
      #1;
      fa = a; fh = h_in; fo = h_out;
      for (int r = 0; r < 16; r++) begin
        checks++;
        if (fo[255 - 16*r -: 16] !== 16'(fa[255 - 16*r -: 16] + fh[255 - 16*r -: 16])) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d", r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
