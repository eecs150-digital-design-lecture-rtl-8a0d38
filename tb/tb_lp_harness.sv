// Self-checking test of one list processor architecture (ARCH = 1..4)
// connected to a list memory.
//
// For each test list the memory is loaded through its write port, START is
// held high for two clocks and dropped, and the clock edges until DONE are
// counted. Checked: R against the sum from walking the list in the test,
// the address the processor puts on the memory in every loop cycle (the
// order of pointer and value fetches of the schedule),
// the cycle count (2n+1 edges for #1-#3, 2n+2 for #4, n nodes), that DONE
// and R stay put until START, and that raising START in the middle of a run
// restarts it cleanly. Lists: the four-node example with small and negative
// values, single-node lists, and random lists of up to 120 nodes at random
// addresses. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_lp_harness #(
  parameter int ARCH = 1
);
  import tb_list_pkg::*;

  logic       clk = 1'b0;
  logic       start;
  logic [7:0] a, d, r, wa, wd;
  logic       we, done;
  int         checks = 0, failures = 0;
  list_image  img;

  always #5 clk = ~clk;

  list_mem u_mem (.clk, .a, .d, .we, .wa, .wd);

  if (ARCH == 1) begin : g_dut
    list_proc1 dut (.clk, .start, .a, .d, .done, .r);
  end else if (ARCH == 2) begin : g_dut
    list_proc2 dut (.clk, .start, .a, .d, .done, .r);
  end else if (ARCH == 3) begin : g_dut
    list_proc3 dut (.clk, .start, .a, .d, .done, .r);
  end else begin : g_dut
    list_proc4 dut (.clk, .start, .a, .d, .done, .r);
  end

  function automatic int expected_edges(int n);
    return (ARCH == 4) ? 2 * n + 2 : 2 * n + 1;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL arch%0d: %s", ARCH, what);
    end
  endtask

  task automatic load_image();
    @(negedge clk);
    we = 1'b1;
    for (int i = 0; i < 256; i++) begin
      wa = 8'(i);
      wd = img.mem[i];
      @(negedge clk);
    end
    we = 1'b0;
  endtask

  // Memory address schedule of the loop, one entry per clock, for node
  // addresses p0..p(n-1):
  //   #1-#3: value then pointer:  p0+1, p0, p1+1, p1, ...
  //   #4   : pointer then value:  p0, p0+1, p1, p1+1, ...
  function automatic bit [7:0] expected_addr(int k);
    bit [7:0] p = img.node[k / 2];
    if (ARCH == 4) return (k % 2 == 0) ? p : 8'(p + 1);
    else           return (k % 2 == 0) ? 8'(p + 1) : p;
  endfunction

  // Start a run, count edges until DONE, check result, latency, the memory
  // access schedule and that the result holds.
  task automatic run_and_check(string name);
    int       edges;
    bit [7:0] addrs [$];
    @(negedge clk);
    start = 1'b1;
    repeat (2) @(negedge clk);
    start = 1'b0;
    edges = 0;
    do begin
      @(posedge clk);
      edges++;
      #1;
      addrs.push_back(a);
    end while (!done && edges < 1000);
    for (int k = 0; k < 2 * img.n && k < addrs.size(); k++)
      check(addrs[k] == expected_addr(k),
            $sformatf("%s: cycle %0d read address %0d expected %0d", name, k + 1, addrs[k],
                      expected_addr(k)));
    check(done, $sformatf("%s: DONE never rose", name));
    check(r == img.sum, $sformatf("%s: R=%0d expected %0d (n=%0d)", name, r, img.sum, img.n));
    check(edges == expected_edges(img.n),
          $sformatf("%s: DONE after %0d edges, expected %0d (n=%0d)", name, edges,
                    expected_edges(img.n), img.n));
    repeat (5) @(posedge clk);
    #1;
    check(done && r == img.sum, $sformatf("%s: DONE/R not held", name));
  endtask

  initial begin
    img   = new();
    start = 1'b1;
    we    = 1'b0;
    wa    = '0;
    wd    = '0;

    // The four-node example list.
    img.build_example(8'd3, 8'd5, 8'd7, 8'd11);
    load_image();
    run_and_check("example list");
    img.build_example(8'hFF, 8'h80, 8'h7F, 8'hFE);  // -1, -128, 127, -2
    load_image();
    run_and_check("example list, negative values");

    // Single-node lists.
    repeat (3) begin
      img.build_random(1);
      load_image();
      run_and_check("single node");
    end

    // Restart: raise START in the middle of a run, then run to completion.
    img.build_random(30);
    load_image();
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (17) @(negedge clk);
    check(!done, "restart: DONE early");
    run_and_check("after restart");

    // Random lists, longest allowed included.
    img.build_random(120);
    load_image();
    run_and_check("long list");
    repeat (25) begin
      img.build_random(1 + ($urandom % 120));
      load_image();
      run_and_check("random list");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL arch%0d: watchdog", ARCH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
