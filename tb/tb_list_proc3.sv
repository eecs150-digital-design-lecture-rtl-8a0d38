// Testbench of list processor architecture #3: runs the shared list-processor
// test (tb_lp_harness) with ARCH = 3. See tb_lp_harness for what is checked.
module tb_list_proc3;
  tb_lp_harness #(.ARCH(3)) u_test ();
endmodule
