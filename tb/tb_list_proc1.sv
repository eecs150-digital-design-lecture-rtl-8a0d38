// Testbench of list processor architecture #1: runs the shared list-processor
// test (tb_lp_harness) with ARCH = 1. See tb_lp_harness for what is checked.
module tb_list_proc1;
  tb_lp_harness #(.ARCH(1)) u_test ();
endmodule
