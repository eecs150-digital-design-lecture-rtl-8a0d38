// Testbench of list processor architecture #2: runs the shared list-processor
// test (tb_lp_harness) with ARCH = 2. See tb_lp_harness for what is checked.
module tb_list_proc2;
  tb_lp_harness #(.ARCH(2)) u_test ();
endmodule
