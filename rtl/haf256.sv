// haf256: iterative HaF-256 hash core with concurrent error detection.
//
// HaF-256 compresses a formatted message, one 256-bit block M_i at a time,
// into a 256-bit chaining value H (H_0 = IV, the hash is the last H). Per
// block: N = M_i xor salt; round 1 rotates N left by lsb4(N), XORs it into
// H and runs 16 steps F_j on the sixteen 16-bit words; the two strings are
// then swapped (N = H*, H = N*) and round 2 does the same; finally each
// word is added mod 2^16 to the matching word of the H that entered round
// 1. This core holds the 256-bit strings in registers and applies one step
// per clock with a single haf_step instance; every basic operation of the
// step is duplicated and compared (haf_step, dwc_op).
//
// Interface: present m_blk (already padded and length-appended), salt and
// first (1: start from IV, 0: continue from the previous block's hash)
// with start while ready is high. 34 cycles after the accepting edge done
// pulses for one cycle and hash holds H_(i+1) until the next block ends.
// err is the OR of the step's comparators in a step cycle (err_ops per
// operation, see haf_stepop_e), err_flag a sticky copy cleared when a block
// is accepted. fi injects a fault into one operand of one step operation
// for evaluating the detection; tie fi.en low in normal use.
// Schedule, interface and reset (synchronous, active low) are this design's
// choices; the constants of the algorithm are the placeholders of haf_pkg.
module haf256
  import haf_pkg::*;
#(
  parameter logic [HAF_BITS-1:0] IV  = HAF_IV,
  parameter bit                  DWC = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  first,
  input  logic [HAF_BITS-1:0]   m_blk,
  input  logic [HAF_BITS-1:0]   salt,
  input  fault_t                fi,
  output logic                  ready,
  output logic                  done,
  output logic [HAF_BITS-1:0]   hash,
  output logic                  err,
  output logic [HAF_NOPS-1:0]   err_ops,
  output logic                  err_flag
);
  localparam int unsigned W = HAF_N;

  logic [HAF_BITS-1:0]     nreg, hin, hreg;
  logic [0:15][W-1:0]      areg, a_next, h_ff;
  logic [HAF_BITS-1:0]     ent_n, ent_h, ent_nstar, ent_mix;
  logic                    load, step, swap, final_ff;
  logic [3:0]              j;
  logic [HAF_NOPS-1:0]     st_err_ops;
  logic                    st_err;
  fault_t                  fi_step;

  haf_ctrl u_ctrl (
    .clk, .rst_n, .start, .ready, .load, .step, .j, .round2(), .swap,
    .final_ff, .done);

  // round entry: N = M xor salt, H = IV or previous hash (round 1);
  // N = H*, H = N* (round 2)
  always_comb begin
    if (swap) begin
      ent_n = areg;
      ent_h = nreg;
    end else begin
      ent_n = m_blk ^ salt;
      ent_h = first ? IV : hreg;
    end
  end

  haf_round_entry #(.BITS(HAF_BITS)) u_entry (
    .n_in(ent_n), .h_in(ent_h), .n_star(ent_nstar), .h_mix(ent_mix));

  // faults reach the step only while it is in use
  always_comb begin
    fi_step    = fi;
    fi_step.en = fi.en && step;
  end

  haf_step #(.W(W), .DWC(DWC)) u_step (
    .j(j), .a_in(areg), .fi(fi_step), .a_out(a_next),
    .err_ops(st_err_ops), .err(st_err));

  haf_feedforward #(.W(W), .WORDS(HAF_WORDS)) u_ff (
    .a(areg), .h_in(hin), .h_out(h_ff));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nreg     <= '0;
      areg     <= '0;
      hin      <= '0;
      hreg     <= '0;
      err_flag <= 1'b0;
    end else begin
      if (load) begin
        nreg     <= ent_nstar;
        areg     <= ent_mix;
        hin      <= ent_h;
        err_flag <= 1'b0;
      end else if (swap) begin
        nreg <= ent_nstar;
        areg <= ent_mix;
      end else if (step) begin
        areg <= a_next;
      end else if (final_ff) begin
        hreg <= h_ff;
      end
      if (step && st_err) err_flag <= 1'b1;
    end
  end

  always_comb begin
    hash    = hreg;
    err     = step && st_err;
    err_ops = step ? st_err_ops : '0;
  end

  // a block is only accepted while the core is idle
  a_load_ready: assert property (@(posedge clk) disable iff (!rst_n) load |-> ready);
endmodule
