// Datapath of list processor architecture #2.
//
// Adds register NUMA, the address of the number to add, so that the pointer
// increment moves out of the COMPUTE_SUM cycle into GET_NEXT:
//   COMPUTE_SUM: SUM <= SUM + Memory[NUMA]
//   GET_NEXT   : NUMA <= Memory[NEXT] + 1, NEXT <= Memory[NEXT]
// NUMA shares LD_NEXT and NEXT_SEL with NEXT:
//   NEXT_SEL: 1 -> NEXT <= D, NUMA <= D + 1;   0 -> NEXT <= 0, NUMA <= 1
//   SUM_SEL : 1 -> SUM  <= SUM + D;            0 -> SUM  <= 0
//   A_SEL   : 0 -> A = NEXT;                   1 -> A = NUMA
// NEXT_ZERO compares the NEXT multiplexer output with zero. R is SUM.
module lp2_dp
#(
  parameter int unsigned ADDR_W = lp_pkg::ADDR_W,
  parameter int unsigned DATA_W = lp_pkg::DATA_W
) (
  input  logic              clk,
  input  lp_pkg::lp_ctrl_t  ctl,
  output logic [ADDR_W-1:0] a,
  input  logic [DATA_W-1:0] d,
  output logic              next_zero,
  output logic [DATA_W-1:0] r
);

  logic [ADDR_W-1:0] next_q, next_d, numa_q, numa_d;
  logic [DATA_W-1:0] sum_q, sum_d;

  assign next_d    = ctl.next_sel ? ADDR_W'(d) : '0;
  assign numa_d    = ctl.next_sel ? ADDR_W'(d) + 1'b1 : ADDR_W'(1);
  assign sum_d     = ctl.sum_sel ? sum_q + d : '0;
  assign a         = ctl.a_sel ? numa_q : next_q;
  assign next_zero = (next_d == '0);
  assign r         = sum_q;

  ld_reg #(.W(ADDR_W)) u_next (.clk, .ld(ctl.ld_next), .d(next_d), .q(next_q));
  ld_reg #(.W(ADDR_W)) u_numa (.clk, .ld(ctl.ld_next), .d(numa_d), .q(numa_q));
  ld_reg #(.W(DATA_W)) u_sum  (.clk, .ld(ctl.ld_sum),  .d(sum_d),  .q(sum_q));

endmodule
