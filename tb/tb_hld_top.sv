// End-to-end test of the top level at its default sizes.
//
// List processors: the same list is loaded into all four memories through
// the shared load port, START is pulsed, and each architecture's R and its
// DONE latency (2n+1 edges for #1-#3, 2n+2 for #4) are checked against a
// walk of the list done in the test. Lists: the four-node example, a
// single-node list, a run restarted half-way by START, and random lists.
// Mechanisms counted (each must happen at least once): loop iterations,
// end-of-list detection, restart by START during a run, the drain state of
// architecture #4, and completed sequences of both register-transfer
// examples, whose results are checked as well.
module tb_hld_top;
  import tb_list_pkg::*;

  logic            clk = 1'b0;
  logic            lp_start, mem_we;
  logic [7:0]      mem_wa, mem_wd;
  logic [3:0]      lp_done;
  logic [3:0][7:0] lp_r;
  logic            acc_load, acc_go, acc_busy;
  logic [7:0]      acc_r0_init, acc_r1_init, acc_acc_init, acc_r0, acc_r1, acc_acc;
  logic            abc_init, abc_go, abc_busy;
  logic [7:0]      abc_in, abc_rega, abc_regb, abc_regc;

  int checks = 0, failures = 0;
  int n_iter = 0, n_end = 0, n_restart = 0, n_drain = 0, n_acc_seq = 0, n_abc_seq = 0;
  list_image img;

  always #5 clk = ~clk;

  hld_top dut (.*);

  // Mechanism counters, sampled on the clock.
  always @(posedge clk) begin
    if (dut.u_lp1.u_ctrl.state == lp_pkg::ST_GET_NEXT && !lp_start) begin
      if (dut.u_lp1.next_zero) n_end++; else n_iter++;
    end
    if (dut.u_lp4.u_ctrl.state == lp_pkg::S4_FINISH && !lp_start) n_drain++;
    if (lp_start && dut.u_lp1.u_ctrl.state inside {lp_pkg::ST_COMPUTE_SUM, lp_pkg::ST_GET_NEXT})
      n_restart++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_image();
    @(negedge clk);
    mem_we = 1'b1;
    for (int i = 0; i < 256; i++) begin
      mem_wa = 8'(i);
      mem_wd = img.mem[i];
      @(negedge clk);
    end
    mem_we = 1'b0;
  endtask

  task automatic run_lists(string name);
    int edges;
    int seen [4];
    @(negedge clk);
    lp_start = 1'b1;
    repeat (2) @(negedge clk);
    lp_start = 1'b0;
    edges = 0;
    foreach (seen[k]) seen[k] = -1;
    do begin
      @(posedge clk);
      edges++;
      #1;
      for (int k = 0; k < 4; k++) if (lp_done[k] && seen[k] < 0) seen[k] = edges;
    end while (lp_done != 4'hF && edges < 1000);
    for (int k = 0; k < 4; k++) begin
      check(lp_r[k] == img.sum, $sformatf("%s: arch #%0d R=%0d expected %0d", name, k + 1,
                                          lp_r[k], img.sum));
      check(seen[k] == ((k == 3) ? 2 * img.n + 2 : 2 * img.n + 1),
            $sformatf("%s: arch #%0d DONE after %0d edges (n=%0d)", name, k + 1, seen[k], img.n));
    end
  endtask

  task automatic run_acc();
    logic [7:0] a0, a1, ac;
    a0 = 8'($urandom); a1 = 8'($urandom); ac = 8'($urandom);
    @(negedge clk);
    acc_load = 1'b1; acc_r0_init = a0; acc_r1_init = a1; acc_acc_init = ac;
    @(negedge clk);
    acc_load = 1'b0; acc_go = 1'b1;
    @(negedge clk);
    acc_go = 1'b0;
    repeat (3) @(negedge clk);
    // ACC <= ACC+R0, R1 <= R0; ACC <= ACC+R1, R0 <= R1; R0 <= ACC
    check(!acc_busy && acc_r1 == a0 && acc_acc == 8'(ac + a0 + a0) && acc_r0 == 8'(ac + a0 + a0),
          "R0/R1/ACC sequence");
    n_acc_seq++;
  endtask

  task automatic run_abc();
    logic [7:0] x1, x2;
    x1 = 8'($urandom); x2 = 8'($urandom);
    @(negedge clk);
    abc_go = 1'b1;
    @(negedge clk);
    abc_go = 1'b0; abc_in = x1;
    @(negedge clk);
    abc_in = x2;
    repeat (3) @(negedge clk);
    check(!abc_busy && abc_rega == x1 && abc_regb == 8'(x1 + x2) && abc_regc == 8'(x1 + x2),
          "regA/regB/regC sequence");
    n_abc_seq++;
  endtask

  initial begin
    img = new();
    lp_start = 1'b1; mem_we = 1'b0; mem_wa = '0; mem_wd = '0;
    acc_load = 1'b0; acc_go = 1'b0; acc_r0_init = '0; acc_r1_init = '0; acc_acc_init = '0;
    abc_init = 1'b1; abc_go = 1'b0; abc_in = '0;
    @(negedge clk);
    abc_init = 1'b0;

    img.build_example(8'd3, 8'd5, 8'd7, 8'd11);
    load_image();
    run_lists("example list");

    img.build_random(1);
    load_image();
    run_lists("single node");

    img.build_random(40);
    load_image();
    @(negedge clk);
    lp_start = 1'b1;
    @(negedge clk);
    lp_start = 1'b0;
    repeat (31) @(negedge clk);
    run_lists("restarted run");

    repeat (6) begin
      img.build_random(1 + ($urandom % 120));
      load_image();
      run_lists("random list");
    end

    repeat (10) begin
      run_acc();
      run_abc();
    end

    check(n_iter > 0,    "no loop iteration seen");
    check(n_end > 0,     "no end-of-list seen");
    check(n_restart > 0, "no restart seen");
    check(n_drain > 0,   "no drain state seen");
    check(n_acc_seq > 0, "no R0/R1/ACC sequence");
    check(n_abc_seq > 0, "no regA/regB/regC sequence");
    $display("mechanisms: iterations=%0d ends=%0d restarts=%0d drains=%0d acc_seq=%0d abc_seq=%0d",
             n_iter, n_end, n_restart, n_drain, n_acc_seq, n_abc_seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
