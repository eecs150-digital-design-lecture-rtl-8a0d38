// Controller of list processor architectures #1, #2 and #3.
//
// Four states, one flip-flop each (one-hot): START, COMPUTE_SUM, GET_NEXT and
// DONE. START=1 forces the START state from any state, so START also serves
// as the reset of the whole processor. With START low the machine leaves
// START for COMPUTE_SUM, alternates COMPUTE_SUM and GET_NEXT (two cycles per
// list element) and goes from GET_NEXT to DONE when NEXT_ZERO is high. DONE
// is held until START rises again.
//
// Control outputs per state follow the published state diagram:
//   START       LD_SUM=1 SUM_SEL=0 LD_NEXT=1 NEXT_SEL=0 DONE=0
//   COMPUTE_SUM A_SEL=1 LD_NEXT=0 LD_SUM=1 SUM_SEL=1 DONE=0
//   GET_NEXT    A_SEL=0 LD_NEXT=1 NEXT_SEL=1 LD_SUM=0 DONE=0
//   DONE        LD_SUM=0 DONE=1
// Outputs the diagram leaves open are driven 0. ADD_SEL (architecture #3's
// shared adder) is this design's addition to the diagram: 1 in COMPUTE_SUM
// (adder adds SUM) and 0 elsewhere (adder adds the constant 1).
// NEXT_ZERO is sampled combinationally in the same cycle (Moore outputs,
// next state depends on the state, START and NEXT_ZERO).
module lp_ctrl
  import lp_pkg::*;
(
  input  logic      clk,
  input  logic      start,
  input  logic      next_zero,
  output lp_ctrl_t  ctl,
  output lp_state_e state
);

  lp_state_e state_n;

  always_ff @(posedge clk) state <= state_n;

  always_comb begin
    if (start) begin
      state_n = ST_START;
    end else begin
      unique case (state)
        ST_START:       state_n = ST_COMPUTE_SUM;
        ST_COMPUTE_SUM: state_n = ST_GET_NEXT;
        ST_GET_NEXT:    state_n = next_zero ? ST_DONE : ST_COMPUTE_SUM;
        ST_DONE:        state_n = ST_DONE;
        // Only reachable before the first START: park in DONE.
        default:        state_n = ST_DONE;
      endcase
    end
  end

  always_comb begin
    ctl = '0;
    unique case (state)
      ST_START: begin
        ctl.ld_sum   = 1'b1;
        ctl.sum_sel  = 1'b0;
        ctl.ld_next  = 1'b1;
        ctl.next_sel = 1'b0;
      end
      ST_COMPUTE_SUM: begin
        ctl.a_sel   = 1'b1;
        ctl.ld_sum  = 1'b1;
        ctl.sum_sel = 1'b1;
        ctl.add_sel = 1'b1;
      end
      ST_GET_NEXT: begin
        ctl.a_sel    = 1'b0;
        ctl.ld_next  = 1'b1;
        ctl.next_sel = 1'b1;
      end
      ST_DONE: begin
        ctl.done = 1'b1;
      end
      default: ctl = '0;
    endcase
  end

  // Handshake rules: START always lands in the START state on the next
  // clock, and DONE holds until START is raised.
  a_start_resets: assert property (@(posedge clk) start |=> state == ST_START);
  a_done_holds:   assert property (@(posedge clk) (state == ST_DONE && !start) |=> state == ST_DONE);

endmodule
