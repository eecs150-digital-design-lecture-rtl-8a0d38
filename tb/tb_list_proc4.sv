// Testbench of list processor architecture #4: runs the shared list-processor
// test (tb_lp_harness) with ARCH = 4. See tb_lp_harness for what is checked.
module tb_list_proc4;
  tb_lp_harness #(.ARCH(4)) u_test ();
endmodule
