// haf_ctrl: sequencer of the iterative HaF-256 core, one step per clock.
//
// A block is accepted in IDLE when start is high (load = 1 in that cycle:
// the datapath applies the round-1 entry stage). Then come 16 cycles of
// round 1 (step = 1, j = 0..15), one SWAP cycle in which the datapath
// exchanges the two strings and applies the round-2 entry stage, 16 cycles
// of round 2 and one FINAL cycle for the feed-forward addition. done is a
// registered one-cycle pulse in the cycle after FINAL, when the new hash
// value is in the chaining register; the core is then back in IDLE and can
// take the next block in that same cycle. From the accepting clock edge to
// the edge that raises done there are 34 cycles. The algorithm fixes the
// 2 x 16 steps; the one-step-per-cycle schedule and the separate entry and
// feed-forward cycles are this design's choice. Reset is synchronous and
// active low.
module haf_ctrl
  import haf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       ready,    // IDLE: a block may be presented
  output logic       load,     // accepting a block this cycle
  output logic       step,     // a step F_j is applied this cycle
  output logic [3:0] j,        // step number within the round
  output logic       round2,   // the step belongs to round 2
  output logic       swap,     // round-2 entry this cycle
  output logic       final_ff, // feed-forward this cycle
  output logic       done
);
  typedef enum logic [2:0] {IDLE, R1, SWAP, R2, FINAL} state_e;
  state_e     state;
  logic [3:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE:  if (start) begin state <= R1; cnt <= '0; end
        R1:    begin cnt <= cnt + 4'd1; if (cnt == 4'd15) state <= SWAP; end
        SWAP:  begin state <= R2; cnt <= '0; end
        R2:    begin cnt <= cnt + 4'd1; if (cnt == 4'd15) state <= FINAL; end
        FINAL: begin state <= IDLE; done <= 1'b1; end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    ready    = (state == IDLE);
    load     = ready && start;
    step     = (state == R1) || (state == R2);
    j        = cnt;
    round2   = (state == R2);
    swap     = (state == SWAP);
    final_ff = (state == FINAL);
  end

  // the step counter only advances inside a round
  a_cnt_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               (state == SWAP) |=> (cnt == 4'd0));
endmodule
