// Top level: the designs of the high-level design example set side by side.
//
// 1. The linked-list summing processor in its four architectures. Each
//    architecture (list_proc1..list_proc4) has a memory of its own
//    (list_mem); all four memories are written together through one load
//    port and all four processors share START, so one run sums the same list
//    four ways. Each processor brings out its own DONE and R.
//      #1 direct datapath, two adders          2 clocks/element
//      #2 NUMA register, pointer add moved     2 clocks/element
//      #3 as #2 with one shared adder          2 clocks/element
//      #4 software-pipelined with X register   2 clocks/element,
//         one fetch and one add per cycle (shortest clock period)
// 2. The R0/R1/ACC register-transfer example (rt_acc) with its own ports.
// 3. The regA/regB/regC register-transfer example (rt_abc) with its own
//    ports.
// All blocks run on the one clock CLK; none has a reset input.
module hld_top
  import lp_pkg::*;
(
  input  logic                          clk,
  // list processors
  input  logic                          lp_start,
  input  logic                          mem_we,
  input  logic [ADDR_W-1:0]             mem_wa,
  input  logic [DATA_W-1:0]             mem_wd,
  output logic [3:0]                    lp_done,  // bit k-1: architecture #k
  output logic [3:0][DATA_W-1:0]        lp_r,
  // R0/R1/ACC example
  input  logic                          acc_load,
  input  logic [7:0]                    acc_r0_init,
  input  logic [7:0]                    acc_r1_init,
  input  logic [7:0]                    acc_acc_init,
  input  logic                          acc_go,
  output logic                          acc_busy,
  output logic [7:0]                    acc_r0,
  output logic [7:0]                    acc_r1,
  output logic [7:0]                    acc_acc,
  // regA/regB/regC example
  input  logic                          abc_init,
  input  logic                          abc_go,
  input  logic [7:0]                    abc_in,
  output logic                          abc_busy,
  output logic [7:0]                    abc_rega,
  output logic [7:0]                    abc_regb,
  output logic [7:0]                    abc_regc
);

  logic [3:0][ADDR_W-1:0] a;
  logic [3:0][DATA_W-1:0] d;

  list_proc1 u_lp1 (.clk, .start(lp_start), .a(a[0]), .d(d[0]), .done(lp_done[0]), .r(lp_r[0]));
  list_proc2 u_lp2 (.clk, .start(lp_start), .a(a[1]), .d(d[1]), .done(lp_done[1]), .r(lp_r[1]));
  list_proc3 u_lp3 (.clk, .start(lp_start), .a(a[2]), .d(d[2]), .done(lp_done[2]), .r(lp_r[2]));
  list_proc4 u_lp4 (.clk, .start(lp_start), .a(a[3]), .d(d[3]), .done(lp_done[3]), .r(lp_r[3]));

  for (genvar k = 0; k < 4; k++) begin : g_mem
    list_mem u_mem (.clk, .a(a[k]), .d(d[k]), .we(mem_we), .wa(mem_wa), .wd(mem_wd));
  end

  rt_acc #(.W(8)) u_acc (
    .clk, .load(acc_load), .r0_init(acc_r0_init), .r1_init(acc_r1_init),
    .acc_init(acc_acc_init), .go(acc_go), .busy(acc_busy),
    .r0(acc_r0), .r1(acc_r1), .acc(acc_acc)
  );

  rt_abc #(.W(8)) u_abc (
    .clk, .init(abc_init), .go(abc_go), .in(abc_in), .busy(abc_busy),
    .rega(abc_rega), .regb(abc_regb), .regc(abc_regc)
  );

endmodule
