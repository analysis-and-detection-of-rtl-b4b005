// tb_fault_inject: checks the three fault models (bit flip, stuck-at-1,
// stuck-at-0) and the pass-through when disabled, on random words and
// error vectors, against the defining formulas computed bit by bit.
module tb_fault_inject;
  import haf_pkg::*;
  logic [15:0] x, e, xe, exp_xe;
  logic        en;
  fi_mode_e    mode;
  int checks = 0, failures = 0;

  fault_inject #(.W(16)) dut (.x, .en, .mode, .e, .xe);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      x    = 16'($urandom);
      e    = 16'($urandom);
      en   = (i % 7) != 0;
      mode = fi_mode_e'(i % 3);
      #1;
      for (int k = 0; k < 16; k++)
        if (!en)               exp_xe[k] = x[k];
        else if (mode == FI_FLIP) exp_xe[k] = e[k] ? !x[k] : x[k];
        else if (mode == FI_SA1)  exp_xe[k] = e[k] ? 1'b1 : x[k];
        else                      exp_xe[k] = e[k] ? 1'b0 : x[k];
      checks++;
      if (xe !== exp_xe) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h e=%h en=%b mode=%s xe=%h exp=%h", x, e, en, mode.name(), xe, exp_xe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
