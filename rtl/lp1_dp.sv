// Datapath of list processor architecture #1 (direct implementation).
//
// Registers SUM and NEXT (load-enable registers, no reset). One adder forms
// SUM + D, a second forms the node's value address NEXT + 1.
//   NEXT_SEL: 1 -> NEXT <= D (the pointer read from memory), 0 -> NEXT <= 0
//   SUM_SEL : 1 -> SUM  <= SUM + D,                          0 -> SUM  <= 0
//   A_SEL   : 0 -> A = NEXT,                                 1 -> A = NEXT + 1
// NEXT_ZERO compares the NEXT multiplexer output with zero, so in GET_NEXT it
// reports whether the pointer being loaded is the null pointer in the same
// cycle. R is the SUM register. All paths between registers are
// combinational through the asynchronous memory; one register transfer per
// clock edge.
module lp1_dp
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

  logic [ADDR_W-1:0] next_q, next_d, next_plus1;
  logic [DATA_W-1:0] sum_q, sum_d;

  assign next_d     = ctl.next_sel ? ADDR_W'(d) : '0;
  assign next_plus1 = next_q + 1'b1;
  assign sum_d      = ctl.sum_sel ? sum_q + d : '0;
  assign a          = ctl.a_sel ? next_plus1 : next_q;
  assign next_zero  = (next_d == '0);
  assign r          = sum_q;

  ld_reg #(.W(ADDR_W)) u_next (.clk, .ld(ctl.ld_next), .d(next_d), .q(next_q));
  ld_reg #(.W(DATA_W)) u_sum  (.clk, .ld(ctl.ld_sum),  .d(sum_d),  .q(sum_q));

endmodule
