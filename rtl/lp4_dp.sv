// Datapath of list processor architecture #4.
//
// Registers X, NEXT, SUM and NUMA (load-enable, no reset) and one adder.
//   X_SEL   : 1 -> X <= D;                 0 -> X <= 0
//   ADD_SEL1: 1 -> adder input 1 = SUM;    0 -> constant 1
//   ADD_SEL2: 1 -> adder input 2 = X;      0 -> NEXT
//   SUM_SEL : 1 -> SUM <= adder;           0 -> SUM <= 0
//   NEXT_SEL: 1 -> NEXT <= D, NUMA <= adder; 0 -> NEXT <= 0, NUMA <= 1
//   A_SEL   : 0 -> A = NEXT;               1 -> A = NUMA
// NUMA has its own load enable LD_NUMA. NEXT_ZERO compares the NEXT
// register (not the value being loaded) with zero. R is SUM.
// Each loop cycle holds one memory access and one add on independent
// registers, so the clock period is set by the slower of the two rather
// than by their sum.
module lp4_dp
  import lp_pkg::*;
#(
  parameter int unsigned W = lp_pkg::DATA_W
) (
  input  logic         clk,
  input  lp4_ctrl_t    ctl,
  output logic [W-1:0] a,
  input  logic [W-1:0] d,
  output logic         next_zero,
  output logic [W-1:0] r
);

  logic [W-1:0] x_q, x_d, next_q, next_d, numa_q, numa_d, sum_q, sum_d;
  logic [W-1:0] add_a, add_b, add_out;

  assign x_d       = ctl.x_sel ? d : '0;
  assign add_a     = ctl.add_sel1 ? sum_q : W'(1);
  assign add_b     = ctl.add_sel2 ? x_q : next_q;
  assign add_out   = add_a + add_b;
  assign sum_d     = ctl.sum_sel ? add_out : '0;
  assign next_d    = ctl.next_sel ? d : '0;
  assign numa_d    = ctl.next_sel ? add_out : W'(1);
  assign a         = ctl.a_sel ? numa_q : next_q;
  assign next_zero = (next_q == '0);
  assign r         = sum_q;

  ld_reg #(.W(W)) u_x    (.clk, .ld(ctl.ld_x),    .d(x_d),    .q(x_q));
  ld_reg #(.W(W)) u_next (.clk, .ld(ctl.ld_next), .d(next_d), .q(next_q));
  ld_reg #(.W(W)) u_numa (.clk, .ld(ctl.ld_numa), .d(numa_d), .q(numa_q));
  ld_reg #(.W(W)) u_sum  (.clk, .ld(ctl.ld_sum),  .d(sum_d),  .q(sum_q));

endmodule
