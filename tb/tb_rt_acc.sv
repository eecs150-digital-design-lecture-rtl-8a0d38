// Testbench of the R0/R1/ACC register-transfer example. For random start
// values it loads R0, R1, ACC, pulses GO and checks, after each of the
// three sequence cycles, the registers against a reference that applies
//   ACC <= ACC + R0, R1 <= R0;  ACC <= ACC + R1, R0 <= R1;  R0 <= ACC
// with all right-hand sides taken before the clock. Also checks that BUSY
// is high for exactly three clocks and that the registers then hold.
module tb_rt_acc;
  logic       clk = 1'b0;
  logic       load, go, busy;
  logic [7:0] r0_init, r1_init, acc_init, r0, r1, acc;
  logic [7:0] m0, m1, ma, t0, t1, ta;
  int         checks = 0, failures = 0, busy_cycles;

  always #5 clk = ~clk;

  rt_acc dut (.clk, .load, .r0_init, .r1_init, .acc_init, .go, .busy, .r0, .r1, .acc);

  task automatic check_regs(string when);
    checks++;
    if (r0 !== m0 || r1 !== m1 || acc !== ma) begin
      failures++;
      $display("FAIL %s: R0=%0d R1=%0d ACC=%0d expected %0d %0d %0d",
               when, r0, r1, acc, m0, m1, ma);
    end
  endtask

  initial begin
    go = 1'b0;
    load = 1'b0;
    r0_init = '0; r1_init = '0; acc_init = '0;
    repeat (50) begin
      @(negedge clk);
      load = 1'b1;
      r0_init = 8'($urandom); r1_init = 8'($urandom); acc_init = 8'($urandom);
      m0 = r0_init; m1 = r1_init; ma = acc_init;
      @(negedge clk);
      load = 1'b0;
      check_regs("after load");
      checks++;
      if (busy) begin failures++; $display("FAIL: busy after load"); end
      go = 1'b1;
      @(negedge clk);
      go = 1'b0;
      busy_cycles = 0;
      // cycle 1
      checks++;
      if (!busy) begin failures++; $display("FAIL: not busy in cycle 1"); end
      ta = ma + m0; t1 = m0; ma = ta; m1 = t1;
      @(negedge clk); check_regs("cycle 1");
      // cycle 2
      ta = ma + m1; t0 = m1; ma = ta; m0 = t0;
      @(negedge clk); check_regs("cycle 2");
      // cycle 3
      m0 = ma;
      @(negedge clk); check_regs("cycle 3");
      checks++;
      if (busy) begin failures++; $display("FAIL: busy after cycle 3"); end
      repeat (2) @(negedge clk);
      check_regs("hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
