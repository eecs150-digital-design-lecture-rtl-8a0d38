// Shared widths, controller encodings and control-word types of the
// linked-list summing processor (architectures #1 to #4).
//
// Every integer and every pointer of the list is 8 bits wide and the memory
// has an 8-bit address and an 8-bit data port; these are the defaults here.
// The controllers of architectures #1-#3 are one-hot (one flip-flop per
// state, as in the gate-level controller of architecture #1); the
// architecture #4 controller uses a binary encoding of its own.
package lp_pkg;

  localparam int unsigned DATA_W = 8;  // width of list values and of SUM/R
  localparam int unsigned ADDR_W = 8;  // width of pointers and memory address

  // Architectures #1-#3: one flip-flop per state.
  typedef enum logic [3:0] {
    ST_START       = 4'b0001,
    ST_COMPUTE_SUM = 4'b0010,
    ST_GET_NEXT    = 4'b0100,
    ST_DONE        = 4'b1000
  } lp_state_e;

  // Control word of architectures #1-#3 (add_sel is used by #3 only).
  typedef struct packed {
    logic ld_sum;
    logic sum_sel;
    logic ld_next;
    logic next_sel;
    logic a_sel;
    logic add_sel;
    logic done;
  } lp_ctrl_t;

  // Architecture #4: two loop states plus one set-up and one drain state.
  typedef enum logic [2:0] {
    S4_START  = 3'd0,  // NEXT<-0, SUM<-0, NUMA<-1, X<-0
    S4_NEXT   = 3'd1,  // NEXT<-Memory[NEXT], SUM<-SUM+X
    S4_X      = 3'd2,  // X<-Memory[NUMA],    NUMA<-NEXT+1
    S4_FINISH = 3'd3,  // SUM<-SUM+X (last element)
    S4_DONE   = 3'd4
  } lp4_state_e;

  // Control word of architecture #4.
  typedef struct packed {
    logic x_sel;
    logic ld_x;
    logic add_sel1;
    logic add_sel2;
    logic sum_sel;
    logic ld_sum;
    logic next_sel;
    logic ld_next;
    logic ld_numa;
    logic a_sel;
    logic done;
  } lp4_ctrl_t;

endpackage
