// tb_haf256: end-to-end test of the HaF-256 core at its default
// parameters.
//
// Hashes messages of one to four formatted blocks, each with its own salt,
// and compares every chaining value with the behavioural reference
// (haf_ref_pkg). Checks the latency (34 cycles from the accepting edge to
// done), that start is ignored while the core is busy, that a new message
// can start in the cycle done is high, and the concurrent error detection:
// fault-free blocks never raise err_flag; a bit-flip fault on one step
// operation, for one cycle (transient) or a whole block (permanent), is
// always flagged and corrupts the hash; stuck-at faults are flagged
// exactly when they changed the hash. Every mechanism is counted and one
// that never happened counts as a failure.
module tb_haf256;
  import haf_pkg::*;
  import haf_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         start = 1'b0, first = 1'b0;
  logic [255:0] m_blk = '0, salt = '0, hash;
  fault_t       fi = '0;
  logic         ready, done, err, err_flag;
  logic [15:0]  err_ops;
  int checks = 0, failures = 0;
  int n_iv = 0, n_chain = 0, n_rot0 = 0, n_rotn = 0, n_b2b = 0, n_busy = 0;
  int n_transient = 0, n_permanent = 0, n_sa_det = 0, n_sa_miss = 0, n_clean = 0;

  haf256 dut (.clk, .rst_n, .start, .first, .m_blk, .salt, .fi,
              .ready, .done, .hash, .err, .err_ops, .err_flag);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int w = 0; w < 8; w++) v[32*w +: 32] = $urandom;
    return v;
  endfunction

  // fault: 0 none, 1 transient bit flip, 2 permanent bit flip, 3 stuck-at
  task automatic run_block(input logic [255:0] m, input logic [255:0] s, input logic fst,
                           input logic [255:0] h_prev, input int fault, output logic [255:0] h_new,
                           input bit back_to_back);
    int cycles, inj_cycle;
    fault_t f;
    logic [255:0] exp_h;
    exp_h = ref_compress(fst ? HAF_IV : h_prev, m, s);
    if (((m ^ s) & 256'hF) == 0) n_rot0++; else n_rotn++;
    if (fst) n_iv++; else n_chain++;
    // inputs are driven and outputs sampled on the falling edge
    if (!back_to_back) begin
      while (!ready) @(negedge clk);
    end else begin
      checks++;
      if (!(done && ready)) begin failures++; $display("FAIL no back-to-back start"); end
      n_b2b++;
    end
    f          = '0;
    f.op       = haf_stepop_e'($urandom_range(0, 15));
    f.operand  = 1'($urandom);
    f.mode     = (fault == 3) ? fi_mode_e'($urandom_range(1, 2)) : FI_FLIP;
    f.vec      = (fault == 3) ? 16'(1 << $urandom_range(0, 15))
                              : (16'($urandom) | 16'(1 << $urandom_range(0, 15)));
    inj_cycle  = $urandom_range(0, 32);
    if (inj_cycle == 16) inj_cycle = 17;        // not the swap cycle
    m_blk = m; salt = s; first = fst; start = 1'b1;
    @(negedge clk);                             // the accepting edge has passed
    m_blk = rnd256(); salt = rnd256(); first = !fst;   // inputs only sampled on accept
    cycles = 0;
    while (!done && cycles < 100) begin
      if (cycles == 5) n_busy++;                // start still high here, must be ignored
      if (cycles == 6) start = 1'b0;
      fi = '0;
      if (fault == 2 || ((fault == 1 || fault == 3) && cycles == inj_cycle)) begin
        fi = f; fi.en = 1'b1;
      end
      @(negedge clk);
      cycles++;
    end
    start = 1'b0;
    fi = '0;
    checks++;
    if (cycles != 34) begin failures++; $display("FAIL latency %0d cycles, expected 34", cycles); end
    h_new = hash;
    case (fault)
      0: begin
        checks++;
        if (hash !== exp_h || err_flag) begin
          failures++;
          $display("FAIL hash %h\n     expected %h err_flag=%b", hash, exp_h, err_flag);
        end
        n_clean++;
      end
      1, 2: begin
        checks++;
        if (!err_flag || hash === exp_h) begin
          failures++;
          $display("FAIL bit-flip fault (op %0d) not detected: err_flag=%b", f.op, err_flag);
        end
        if (fault == 1) n_transient++; else n_permanent++;
      end
      default: begin
        checks++;
        if (err_flag !== (hash !== exp_h)) begin
          failures++;
          $display("FAIL stuck-at fault: err_flag=%b hash changed=%b", err_flag, hash !== exp_h);
        end
        if (err_flag) n_sa_det++; else n_sa_miss++;
      end
    endcase
  endtask

  task automatic mech(input string name, input int n);
    $display("  %-28s %0d", name, n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", name); end
  endtask

  initial begin
    logic [255:0] h, hn, m, s;
    int fault;
    bit b2b;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    b2b = 0;
    for (int msg = 0; msg < 40; msg++) begin
      s = rnd256();
      h = '0;
      for (int blk = 0; blk <= msg % 4; blk++) begin
        m = rnd256();
        if (msg % 5 == 0) m[3:0] = s[3:0];      // rotation by 0 in round 1
        fault = (msg >= 16 && blk == 0) ? (msg % 4) : 0;
        run_block(m, s, blk == 0, h, fault, hn, b2b);
        h = hn;
        b2b = (msg % 3 == 0) && (blk == msg % 4);
      end
      b2b = (msg % 3 == 0);
    end
    $display("mechanisms:");
    mech("message start from IV", n_iv);
    mech("chained block", n_chain);
    mech("round-1 rotation by 0", n_rot0);
    mech("round-1 rotation by >0", n_rotn);
    mech("back-to-back start", n_b2b);
    mech("start ignored while busy", n_busy);
    mech("fault-free, no alarm", n_clean);
    mech("transient flip detected", n_transient);
    mech("permanent flip detected", n_permanent);
    mech("stuck-at detected", n_sa_det);
    $display("  %-28s %0d", "stuck-at without effect", n_sa_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
