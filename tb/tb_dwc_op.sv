// tb_dwc_op: duplication with comparison around each of the four basic
// operations. Without a fault y must equal the reference result and error
// stay low; with a bit-flip fault (non-zero error vector) on either operand
// the faulty result must appear on y and error must rise, because every
// operation is a bijection in each operand (alpha constants non-zero); with
// a stuck-at fault error must rise exactly when the faulty result differs
// from the fault-free one. An instance with DWC = 0 must give the same
// result and never raise error.
module tb_dwc_op;
  import haf_pkg::*;
  import haf_ref_pkg::*;

  logic [15:0] a, b, vec;
  logic        fi_en, fi_operand;
  fi_mode_e    fi_mode;
  logic [3:0][15:0] y;
  logic [3:0]       error;
  int checks = 0, failures = 0;

  // an unprotected adder (DWC = 0): same result, never an error
  logic [15:0] y_nd;
  logic        err_nd;
  dwc_op #(.OP(OP_ADD), .W(16), .DWC(1'b0)) dut_nodwc (
    .a, .b, .fi_en, .fi_operand, .fi_mode, .fi_vec(vec), .y(y_nd), .error(err_nd));

  for (genvar k = 0; k < 4; k++) begin : g_dut
    dwc_op #(.OP(haf_op_e'(k)), .W(16), .POLY(HAF_RPOLY)) dut (
      .a, .b, .fi_en, .fi_operand, .fi_mode, .fi_vec(vec), .y(y[k]), .error(error[k]));
  end

  function automatic logic [15:0] ref_op(int k, logic [15:0] p, logic [15:0] q);
    case (k)
      0: return p + q;
      1: return p ^ q;
      2: return ref_mulmod(p, q);
      default: return ref_gfmul(p, q);
    endcase
  endfunction

  function automatic logic [15:0] apply(fi_mode_e m, logic [15:0] x, logic [15:0] e);
    case (m)
      FI_FLIP: return x ^ e;
      FI_SA1:  return x | e;
      default: return x & ~e;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] pa, pb, good, bad;
    for (int i = 0; i < 3000; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      if (i % 2 == 1) a = HAF_ALPHA3;     // constant operand as in the step
      if (a == 0) a = 16'h1;               // a zero factor would hide faults in
      if (b == 0) b = 16'h1;               // the other operand of the products
      fi_en      = (i % 4) != 0;
      fi_operand = 1'($urandom);
      fi_mode    = fi_mode_e'($urandom_range(0, 2));
      vec        = 16'($urandom) | 16'(1 << $urandom_range(0, 15));
      #1;
      checks++;
      if (y_nd !== y[0] || err_nd !== 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL DWC=0 instance y=%h exp=%h error=%b", y_nd, y[0], err_nd);
      end
      for (int k = 0; k < 4; k++) begin
        good = ref_op(k, a, b);
        pa = (fi_en && !fi_operand) ? apply(fi_mode, a, vec) : a;
        pb = (fi_en &&  fi_operand) ? apply(fi_mode, b, vec) : b;
        bad = ref_op(k, pa, pb);
        checks++;
        if (y[k] !== bad || error[k] !== (bad != good)) begin
          failures++;
          if (failures < 10)
            $display("FAIL op=%0d a=%h b=%h fi=%b/%b/%s/%h y=%h exp=%h err=%b",
                     k, a, b, fi_en, fi_operand, fi_mode.name(), vec, y[k], bad, error[k]);
        end
        if (fi_en && fi_mode == FI_FLIP) begin
          checks++;
          if (!error[k]) begin
            failures++;
            $display("FAIL bit flip not detected op=%0d", k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
