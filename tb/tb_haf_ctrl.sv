// tb_haf_ctrl: the sequence of one block: accept, 16 steps of round 1 with
// j = 0..15, one swap cycle, 16 steps of round 2, one feed-forward cycle,
// then done one cycle later (34 cycles from the accepting edge), back in
// IDLE. start while busy must be ignored. Two blocks are run, the second
// accepted in the cycle done is high.
module tb_haf_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic ready, load, step, round2, swap, final_ff, done;
  logic [3:0] j;
  int checks = 0, failures = 0;

  haf_ctrl dut (.clk, .rst_n, .start, .ready, .load, .step, .j, .round2, .swap, .final_ff, .done);

  always #5 clk = ~clk;

  task automatic expect_(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int blk = 0; blk < 2; blk++) begin
      #1;
      expect_("ready in idle", ready);
      start = 1'b1;
      #1;
      expect_("load when start in idle", load);
      @(posedge clk);                          // accepting edge
      #1;
      start = 1'b1;                            // held high: must be ignored
      for (int r = 0; r < 2; r++) begin
        for (int s = 0; s < 16; s++) begin
          expect_("step", step && !swap && !final_ff && !ready && !load && j == 4'(s) && round2 == (r == 1));
          @(posedge clk); #1;
        end
        if (r == 0) begin
          expect_("swap", swap && !step);
          @(posedge clk); #1;
        end
      end
      start = 1'b0;
      expect_("final", final_ff && !step && !done);
      @(posedge clk); #1;
      expect_("done after 34 cycles", done && ready);
    end
    @(posedge clk); #1;
    expect_("done is a pulse", !done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
