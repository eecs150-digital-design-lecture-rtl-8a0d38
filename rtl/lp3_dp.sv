// Datapath of list processor architecture #3: architecture #2 with its two
// adders merged into one.
//
// The single adder adds the memory word D to the ADD_SEL multiplexer output:
//   ADD_SEL : 1 -> SUM + D (COMPUTE_SUM);  0 -> 1 + D (GET_NEXT, for NUMA)
// and its result feeds both the SUM and the NUMA multiplexers:
//   SUM_SEL : 1 -> SUM  <= adder;          0 -> SUM  <= 0
//   NEXT_SEL: 1 -> NUMA <= adder, NEXT <= D; 0 -> NUMA <= 1, NEXT <= 0
//   A_SEL   : 0 -> A = NEXT;               1 -> A = NUMA
// NEXT_ZERO compares the NEXT multiplexer output with zero. R is SUM.
// All words are DATA_W = ADDR_W bits wide here, since one adder serves both.
module lp3_dp
  import lp_pkg::*;
#(
  parameter int unsigned W = lp_pkg::DATA_W
) (
  input  logic         clk,
  input  lp_ctrl_t     ctl,
  output logic [W-1:0] a,
  input  logic [W-1:0] d,
  output logic         next_zero,
  output logic [W-1:0] r
);

  logic [W-1:0] next_q, next_d, numa_q, numa_d, sum_q, sum_d;
  logic [W-1:0] add_in, add_out;

  assign add_in    = ctl.add_sel ? sum_q : W'(1);
  assign add_out   = add_in + d;
  assign next_d    = ctl.next_sel ? d : '0;
  assign numa_d    = ctl.next_sel ? add_out : W'(1);
  assign sum_d     = ctl.sum_sel ? add_out : '0;
  assign a         = ctl.a_sel ? numa_q : next_q;
  assign next_zero = (next_d == '0);
  assign r         = sum_q;

  ld_reg #(.W(W)) u_next (.clk, .ld(ctl.ld_next), .d(next_d), .q(next_q));
  ld_reg #(.W(W)) u_numa (.clk, .ld(ctl.ld_next), .d(numa_d), .q(numa_q));
  ld_reg #(.W(W)) u_sum  (.clk, .ld(ctl.ld_sum),  .d(sum_d),  .q(sum_q));

endmodule
