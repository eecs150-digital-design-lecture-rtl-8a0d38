// Controller of list processor architecture #4 (software-pipelined loop).
//
// The loop alternates two states, each of which does one memory fetch and
// one add that do not depend on each other:
//   S4_X   : X <= Memory[NUMA],  NUMA <= NEXT + 1
//   S4_NEXT: NEXT <= Memory[NEXT], SUM <= SUM + X
// Two states sit outside the loop. S4_START clears SUM and X, sets NEXT to
// 0 and NUMA to 1; it is entered from any state while START is high. The
// first S4_NEXT after it then fetches the head pointer Memory[0]. S4_FINISH
// adds the last element (SUM <= SUM + X) after the loop ends, and S4_DONE
// holds DONE high until START rises again.
// NEXT_ZERO is the NEXT register compared with zero and is tested in S4_X:
// once NEXT is null, that S4_X fetches the last value and S4_FINISH adds it,
// so DONE follows two clocks after NEXT becomes zero.
// Control outputs are decoded from the state alone (Moore).
module lp4_ctrl
  import lp_pkg::*;
(
  input  logic       clk,
  input  logic       start,
  input  logic       next_zero,
  output lp4_ctrl_t  ctl,
  output lp4_state_e state
);

  lp4_state_e state_n;

  always_ff @(posedge clk) state <= state_n;

  always_comb begin
    if (start) begin
      state_n = S4_START;
    end else begin
      unique case (state)
        S4_START:  state_n = S4_NEXT;
        S4_NEXT:   state_n = S4_X;
        S4_X:      state_n = next_zero ? S4_FINISH : S4_NEXT;
        S4_FINISH: state_n = S4_DONE;
        S4_DONE:   state_n = S4_DONE;
        // Only reachable before the first START: park in DONE.
        default:   state_n = S4_DONE;
      endcase
    end
  end

  always_comb begin
    ctl = '0;
    unique case (state)
      S4_START: begin
        ctl.ld_next  = 1'b1;  // NEXT <= 0   (NEXT_SEL = 0)
        ctl.ld_numa  = 1'b1;  // NUMA <= 1   (NEXT_SEL = 0)
        ctl.ld_sum   = 1'b1;  // SUM  <= 0   (SUM_SEL = 0)
        ctl.ld_x     = 1'b1;  // X    <= 0   (X_SEL = 0)
      end
      S4_NEXT: begin
        ctl.a_sel    = 1'b0;  // A = NEXT
        ctl.next_sel = 1'b1;
        ctl.ld_next  = 1'b1;  // NEXT <= D
        ctl.add_sel1 = 1'b1;  // adder = SUM + X
        ctl.add_sel2 = 1'b1;
        ctl.sum_sel  = 1'b1;
        ctl.ld_sum   = 1'b1;
      end
      S4_X: begin
        ctl.a_sel    = 1'b1;  // A = NUMA
        ctl.x_sel    = 1'b1;
        ctl.ld_x     = 1'b1;  // X <= D
        ctl.add_sel1 = 1'b0;  // adder = 1 + NEXT
        ctl.add_sel2 = 1'b0;
        ctl.next_sel = 1'b1;
        ctl.ld_numa  = 1'b1;  // NUMA <= adder
      end
      S4_FINISH: begin
        ctl.add_sel1 = 1'b1;
        ctl.add_sel2 = 1'b1;
        ctl.sum_sel  = 1'b1;
        ctl.ld_sum   = 1'b1;  // SUM <= SUM + X
      end
      S4_DONE: ctl.done = 1'b1;
      default: ctl = '0;
    endcase
  end

  // Handshake rules: START always lands in the START state on the next
  // clock, and DONE holds until START is raised.
  a_start_resets: assert property (@(posedge clk) start |=> state == S4_START);
  a_done_holds:   assert property (@(posedge clk) (state == S4_DONE && !start) |=> state == S4_DONE);

endmodule
