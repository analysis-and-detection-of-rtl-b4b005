// tb_haf_round_entry: the round entry stage on random strings and on
// every rotation amount 0..15: n_star must be N rotated left by lsb4(N)
// (reference rotates one bit at a time) and h_mix = H xor n_star.
module tb_haf_round_entry;
  import haf_ref_pkg::*;
  logic [255:0] n_in, h_in, n_star, h_mix, exp_n;
  int checks = 0, failures = 0;

  haf_round_entry #(.BITS(256)) dut (.n_in, .h_in, .n_star, .h_mix);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      for (int w = 0; w < 8; w++) begin
        n_in[32*w +: 32] = $urandom;
        h_in[32*w +: 32] = $urandom;
      end
      n_in[3:0] = 4'(i % 16);
      if (i == 0) n_in = {4'h8, 248'h0, 4'h1};   // the top bit wraps to bit 0
      #1;
      exp_n = ref_rotl256(n_in, n_in[3:0]);
      checks++;
      if (n_star !== exp_n || h_mix !== (h_in ^ exp_n)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%h t=%0d n*=%h exp=%h", n_in, n_in[3:0], n_star, exp_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
