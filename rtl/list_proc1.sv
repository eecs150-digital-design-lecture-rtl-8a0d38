// Linked-list summing processor, architecture #1, the direct implementation of the algorithm: SUM <= SUM +
// Memory[NEXT+1] in COMPUTE_SUM and NEXT <= Memory[NEXT] in GET_NEXT, with one
// adder for the sum and one for the address NEXT+1.
//
// The list starts at memory address 0. Each node is a pointer word followed by
// a value word (node at address p: Memory[p] = next node, Memory[p+1] =
// value); a null pointer ends the list and there is at least one node.
// Values are two's complement and the sum wraps at DATA_W bits.
//
// Interface: hold START high for at least one clock to reset to the head of
// the list; the run begins on the first clock with START low. A/D connect to
// an asynchronous-read memory. DONE goes high and R holds the sum once the
// list has been walked; both stay until START rises again.
// Timing: two clocks per list element. Counting the first rising edge at
// which START is sampled low as edge 1, DONE is high after edge 2n+1 for a
// list of n nodes.
module list_proc1
  import lp_pkg::*;
(
  input  logic              clk,
  input  logic              start,
  output logic [ADDR_W-1:0] a,
  input  logic [DATA_W-1:0] d,
  output logic              done,
  output logic [DATA_W-1:0] r
);

  lp_ctrl_t  ctl;
  lp_state_e state;
  logic      next_zero;

  lp_ctrl u_ctrl (.clk, .start, .next_zero, .ctl, .state);
  lp1_dp u_dp (.clk, .ctl, .a, .d, .next_zero, .r);

  assign done = ctl.done;

endmodule
