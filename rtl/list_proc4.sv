// Linked-list summing processor, architecture #4: the loop is software
// pipelined with an extra X register so that every cycle does one memory
// fetch and one add that are independent of each other:
//   X <= Memory[NUMA], NUMA <= NEXT + 1;   NEXT <= Memory[NEXT], SUM <= SUM + X
// Three list elements are in flight at once (one pointer being fetched, one
// value being fetched, one being added) and the rate stays at two clocks
// per element with a shorter clock period.
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
// Timing: two clocks per list element plus one set-up and one drain cycle.
// Counting the first rising edge at which START is sampled low as edge 1,
// DONE is high after edge 2n+2 for a list of n nodes.
module list_proc4
  import lp_pkg::*;
(
  input  logic              clk,
  input  logic              start,
  output logic [ADDR_W-1:0] a,
  input  logic [DATA_W-1:0] d,
  output logic              done,
  output logic [DATA_W-1:0] r
);

  lp4_ctrl_t  ctl;
  lp4_state_e state;
  logic      next_zero;

  lp4_ctrl u_ctrl (.clk, .start, .next_zero, .ctl, .state);
  lp4_dp u_dp (.clk, .ctl, .a, .d, .next_zero, .r);

  assign done = ctl.done;

endmodule
