// tb_haf_dwc_coverage: fault-coverage experiment of the duplication with
// comparison, run on the complete core at its default parameters.
//
// For each kind of basic operation of the step (multiplication mod 2^16+1,
// XOR, addition mod 2^16, multiplication mod R(x)), for 1 to 5 faulty bits
// in the error vector, for permanent faults (held for a whole block) and
// transient ones (one step cycle), and for the bit-flip and stuck-at fault
// models, blocks are hashed with a fault on a random operand of a random
// operation of that kind. Each step cycle with the fault present is one
// evaluation; it counts as detected when that operation's comparator
// fires. The table printed at the end gives the percentage detected.
// Checks: every bit-flip evaluation is detected; for stuck-at faults the
// rate with one faulty bit lies near one half (a stuck bit already at its
// stuck value causes no error and cannot be detected) and grows from one
// to five faulty bits.
module tb_haf_dwc_coverage;
  import haf_pkg::*;

  localparam int TRIALS = 120;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         start = 1'b0, first = 1'b1;
  logic [255:0] m_blk = '0, salt = '0, hash;
  fault_t       fi = '0;
  logic         ready, done, err, err_flag;
  logic [15:0]  err_ops;
  int checks = 0, failures = 0;
  // [kind][errors-1][permanent][stuck-at]
  int n_eval [4][5][2][2];
  int n_det  [4][5][2][2];

  haf256 dut (.clk, .rst_n, .start, .first, .m_blk, .salt, .fi,
              .ready, .done, .hash, .err, .err_ops, .err_flag);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic haf_stepop_e pick_op(int kind);
    case (kind)
      0: return S_MUL;
      1: begin
        haf_stepop_e x[7] = '{S_X02, S_X3, S_X5, S_X57, S_X8, S_XC, S_XF};
        return x[$urandom_range(0, 6)];
      end
      2: begin
        haf_stepop_e x[4] = '{S_A16, S_A9B, S_A14, S_AS};
        return x[$urandom_range(0, 3)];
      end
      default: return haf_stepop_e'($urandom_range(0, 3));
    endcase
  endfunction

  function automatic logic [15:0] k_bits(int k);
    logic [15:0] v = '0;
    while ($countones(v) < k) v[$urandom_range(0, 15)] = 1'b1;
    return v;
  endfunction

  task automatic trial(int kind, int k, int perm, int sa);
    fault_t f;
    int cyc, inj;
    f         = '0;
    f.en      = 1'b1;
    f.op      = pick_op(kind);
    f.operand = 1'($urandom);
    f.mode    = (sa != 0) ? fi_mode_e'($urandom_range(1, 2)) : FI_FLIP;
    f.vec     = k_bits(k);
    inj       = $urandom_range(0, 31);
    inj       = (inj < 16) ? inj : inj + 1;       // skip the swap cycle
    while (!ready) @(negedge clk);
    for (int w = 0; w < 8; w++) begin
      m_blk[32*w +: 32] = $urandom;
      salt[32*w +: 32]  = $urandom;
    end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (cyc = 0; cyc < 33; cyc++) begin
      fi = (perm != 0 || cyc == inj) ? f : '0;
      #1;                                      // comparators settle
      if (fi.en && cyc != 16) begin
        n_eval[kind][k-1][perm][sa]++;
        if (err_ops[f.op]) n_det[kind][k-1][perm][sa]++;
      end
      @(negedge clk);
    end
    fi = '0;
    while (!done) @(negedge clk);
  endtask

  function automatic real pct(int d, int n);
    return (n == 0) ? 0.0 : 100.0 * d / n;
  endfunction

  initial begin
    string kname[4] = '{"a (.) b    ", "v xor w    ", "v + w      ", "p1 (x) p2  "};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int kind = 0; kind < 4; kind++)
      for (int k = 1; k <= 5; k++)
        for (int perm = 0; perm < 2; perm++)
          for (int sa = 0; sa < 2; sa++)
            for (int t = 0; t < TRIALS; t++) trial(kind, k, perm, sa);

    for (int perm = 1; perm >= 0; perm--) begin
      $display("%s faults, detected evaluations in %% (errors 1..5):", (perm != 0) ? "permanent" : "transient");
      for (int kind = 0; kind < 4; kind++) begin
        $write("  %s stuck-at:", kname[kind]);
        for (int k = 0; k < 5; k++) $write(" %5.1f", pct(n_det[kind][k][perm][1], n_eval[kind][k][perm][1]));
        $write("   bit flip:");
        for (int k = 0; k < 5; k++) $write(" %5.1f", pct(n_det[kind][k][perm][0], n_eval[kind][k][perm][0]));
        $write("\n");
        for (int k = 0; k < 5; k++) begin
          checks++;
          if (n_eval[kind][k][perm][0] == 0 || n_det[kind][k][perm][0] != n_eval[kind][k][perm][0]) begin
            failures++;
            $display("FAIL bit flips not all detected: kind %0d, %0d errors", kind, k + 1);
          end
        end
        checks++;
        if (pct(n_det[kind][0][perm][1], n_eval[kind][0][perm][1]) < 35.0 ||
            pct(n_det[kind][0][perm][1], n_eval[kind][0][perm][1]) > 70.0) begin
          failures++;
          $display("FAIL single stuck-at detection rate out of range: kind %0d", kind);
        end
        checks++;
        if (pct(n_det[kind][4][perm][1], n_eval[kind][4][perm][1]) <=
            pct(n_det[kind][0][perm][1], n_eval[kind][0][perm][1])) begin
          failures++;
          $display("FAIL stuck-at detection does not grow with the number of errors: kind %0d", kind);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
