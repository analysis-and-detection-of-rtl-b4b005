// tb_haf_error_propagation: how a single bit flip spreads through HaF-256.
//
// Step level: one round (16 steps) is run twice through the step function,
// once from a state and once from the same state with one bit of A13
// flipped before step 0. The flipped word moves down one position per
// step and is first read by the step at step 2, as A11 in the sum chain
// A9 + A11 + A14, so the new A15 of steps 0 and 1 must be unchanged and
// that of step 2 must differ (through two additions and a bijective
// S-box, a one-bit change cannot vanish). The average
// share of wrong bits after step 15 is printed and must lie between 25 %
// and 60 %.
// Block level: two cores hash the same block, one with a single message
// bit flipped (a single-bit error at the round-1 input); the average share
// of wrong hash bits is printed and must lie between 40 % and 60 %.
module tb_haf_error_propagation;
  import haf_pkg::*;

  localparam int TRIALS = 200;

  logic [3:0]        j;
  logic [0:15][15:0] sa, sb, na, nb;
  logic [15:0]       ea, eb;
  logic              xa, xb;
  int checks = 0, failures = 0;

  haf_step u_good (.j, .a_in(sa), .fi('0), .a_out(na), .err_ops(ea), .err(xa));
  haf_step u_bad  (.j, .a_in(sb), .fi('0), .a_out(nb), .err_ops(eb), .err(xb));

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [255:0] m_a, m_b, salt, h_a, h_b;
  logic         rdy_a, rdy_b, dn_a, dn_b, er_a, er_b, ef_a, ef_b;
  logic [15:0]  eo_a, eo_b;

  haf256 u_core_a (.clk, .rst_n, .start, .first(1'b1), .m_blk(m_a), .salt, .fi('0),
                   .ready(rdy_a), .done(dn_a), .hash(h_a), .err(er_a), .err_ops(eo_a), .err_flag(ef_a));
  haf256 u_core_b (.clk, .rst_n, .start, .first(1'b1), .m_blk(m_b), .salt, .fi('0),
                   .ready(rdy_b), .done(dn_b), .hash(h_b), .err(er_b), .err_ops(eo_b), .err_flag(ef_b));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint wrong_step = 0, wrong_hash = 0;
    int bad_early = 0, good_s4 = 0, bit_pos;
    // ---- step level
    for (int t = 0; t < TRIALS; t++) begin
      if (t == 0) sa = 256'h076A3663D2541F389E94CA4E1A759C92ED3282E598AFFC1514A6F9DDBA029ABE;
      else for (int r = 0; r < 16; r++) sa[r] = 16'($urandom);
      sb = sa;
      if (t == 0) sb[13] = 16'hF95D;            // F9DD -> F95D, bit 7 flipped
      else begin
        bit_pos = $urandom_range(0, 15);
        sb[13][bit_pos] = ~sb[13][bit_pos];
      end
      for (int s = 0; s < 16; s++) begin
        j = 4'(s);
        #1;
        if (s < 2 && na[15] != nb[15]) bad_early++;
        if (s == 2 && na[15] != nb[15]) good_s4++;
        sa = na; sb = nb;
      end
      wrong_step += $countones(sa ^ sb);
    end
    checks++;
    if (bad_early != 0) begin failures++; $display("FAIL error reached A15 before step 2"); end
    checks++;
    if (good_s4 != TRIALS) begin failures++; $display("FAIL error did not reach A15 at step 2 (%0d)", good_s4); end
    $display("step level: %0.1f %% of the 256 bits wrong after step 15",
             100.0 * real'(wrong_step) / (256.0 * TRIALS));
    checks++;
    if (wrong_step < longint'(64 * TRIALS) || wrong_step > longint'(154 * TRIALS)) begin
      failures++; $display("FAIL step-level spread out of range");
    end
    // ---- block level
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < TRIALS / 4; t++) begin
      for (int w = 0; w < 8; w++) begin
        m_a[32*w +: 32] = $urandom;
        salt[32*w +: 32] = $urandom;
      end
      m_b = m_a;
      m_b[$urandom_range(4, 255)] ^= 1'b1;      // same rotation amount
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!dn_a) @(negedge clk);
      checks++;
      if (!dn_b || h_a == h_b || ef_a || ef_b) begin failures++; $display("FAIL block-level run %0d", t); end
      wrong_hash += $countones(h_a ^ h_b);
    end
    $display("block level: %0.1f %% of the 256 hash bits wrong after one message bit flip",
             100.0 * real'(wrong_hash) / (256.0 * (TRIALS / 4)));
    checks++;
    if (wrong_hash < longint'(102 * TRIALS / 4) || wrong_hash > longint'(154 * TRIALS / 4)) begin
      failures++; $display("FAIL block-level spread out of range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
