// tb_haf_step: self-checking test of the step function F_j.
//
// 1. Published round trace: nine consecutive states of a round (steps 0..8
//    of round 1, constants of the published trace unknown here) are fed in
//    one after the other; the words that do not depend on the algorithm's
//    constants (new A0..A14: the shift by one word and A10 <<< 7) must match
//    the next published state.
// 2. Random states and step numbers: all sixteen output words against the
//    behavioural reference, no error flag.
// 3. Fault injection: a bit flip on one operand of one operation must raise
//    exactly that operation's comparator (the duplicates further on see the
//    same, already faulty, operands) and corrupt the new A15.
module tb_haf_step;
  import haf_pkg::*;
  import haf_ref_pkg::*;

  logic [3:0]     j;
  state_t         a_in, a_out, exp_o;
  fault_t         fi;
  logic [15:0]    err_ops;
  logic           err;
  int checks = 0, failures = 0;

  localparam logic [0:8][255:0] TRACE = {
    256'h3663D2541F389E94CA4E1A759C92ED3282E598AFFC1514A6F95DBA029ABEDFA8,
    256'hD2541F389E94CA4E1A759C92ED3282E598AF0AFE14A6F95DBA029ABEDFA8C321,
    256'h1F389E94CA4E1A759C92ED3282E598AF0AFE530AF95DBA029ABEDFA8C3210741,
    256'h9E94CA4E1A759C92ED3282E598AF0AFE530AAEFCBA029ABEDFA8C3210741A47E,
    256'hCA4E1A759C92ED3282E598AF0AFE530AAEFC015D9ABEDFA8C3210741A47E1059,
    256'h1A759C92ED3282E598AF0AFE530AAEFC015D5F4DDFA8C3210741A47E105943F0,
    256'h9C92ED3282E598AF0AFE530AAEFC015D5F4DD46FC3210741A47E105943F0D7D2,
    256'hED3282E598AF0AFE530AAEFC015D5F4DD46F90E10741A47E105943F0D7D2C084,
    256'h82E598AF0AFE530AAEFC015D5F4DD46F90E1A083A47E105943F0D7D2C084A3FF
  };

  haf_step #(.W(16)) dut (.j, .a_in, .fi, .a_out, .err_ops, .err);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state_t nxt;
    fi = '0;
    // 1. published trace
    for (int k = 0; k < 8; k++) begin
      a_in = TRACE[k];
      nxt  = TRACE[k+1];
      j    = 4'(k + 1);
      #1;
      for (int r = 0; r < 15; r++) begin
        checks++;
        if (a_out[r] !== nxt[r]) begin
          failures++;
          $display("FAIL trace step %0d word A%0d: %h, published %h", k + 1, r, a_out[r], nxt[r]);
        end
      end
    end
    // 2. random states
    for (int i = 0; i < 3000; i++) begin
      for (int r = 0; r < 16; r++) a_in[r] = 16'($urandom);
      j = 4'($urandom);
      #1;
      exp_o = ref_step(j, a_in);
      checks++;
      if (a_out !== exp_o || err !== 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL j=%0d in=%h out=%h exp=%h err=%b", j, a_in, a_out, exp_o, err);
      end
    end
    // 3. single operations faulted
    for (int i = 0; i < 2000; i++) begin
      for (int r = 0; r < 16; r++) a_in[r] = 16'($urandom);
      j          = 4'($urandom);
      fi.en      = 1'b1;
      fi.op      = haf_stepop_e'(i % 16);
      fi.operand = 1'($urandom);
      fi.mode    = FI_FLIP;
      fi.vec     = 16'($urandom) | 16'(1 << $urandom_range(0, 15));
      #1;
      exp_o = ref_step(j, a_in);
      checks++;
      if (err_ops !== (16'h1 << (i % 16)) || !err || a_out[15] === exp_o[15]) begin
        failures++;
        if (failures < 10) $display("FAIL fault op=%0d operand=%0d err_ops=%h out15=%h fault-free %h",
                                    i % 16, fi.operand, err_ops, a_out[15], exp_o[15]);
      end
      fi = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
