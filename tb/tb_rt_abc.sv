// Testbench of the regA/regB/regC register-transfer example. For random
// inputs it runs the sequence regA <= IN; regB <= IN; regC <= regA + regB;
// regB <= regC, changing IN every cycle, and checks each register after
// each cycle against values worked out in the test, then that BUSY lasts
// four clocks and the registers hold afterwards.
module tb_rt_abc;
  logic       clk = 1'b0;
  logic       init, go, busy;
  logic [7:0] in, rega, regb, regc;
  logic [7:0] x1, x2;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  rt_abc dut (.clk, .init, .go, .in, .busy, .rega, .regb, .regc);

  task automatic expect3(string when, logic [7:0] ea, logic [7:0] eb, logic [7:0] ec);
    checks++;
    if (rega !== ea || regb !== eb || regc !== ec) begin
      failures++;
      $display("FAIL %s: A=%0d B=%0d C=%0d expected %0d %0d %0d", when, rega, regb, regc, ea, eb, ec);
    end
  endtask

  task automatic expect_busy(logic e, string when);
    checks++;
    if (busy !== e) begin failures++; $display("FAIL %s: busy=%0d", when, busy); end
  endtask

  initial begin
    init = 1'b1; go = 1'b0; in = '0;
    @(negedge clk);
    init = 1'b0;
    expect_busy(1'b0, "idle");
    repeat (50) begin
      x1 = 8'($urandom);
      x2 = 8'($urandom);
      go = 1'b1;
      @(negedge clk);
      go = 1'b0;
      expect_busy(1'b1, "cycle 1");
      in = x1;
      @(negedge clk);
      checks++;
      if (rega !== x1) begin failures++; $display("FAIL cycle 1: A=%0d", rega); end
      in = x2;
      @(negedge clk);
      checks++;
      if (rega !== x1 || regb !== x2) begin failures++; $display("FAIL cycle 2"); end
      in = 8'($urandom);
      @(negedge clk);
      checks++;
      if (regc !== 8'(x1 + x2)) begin failures++; $display("FAIL cycle 3: C=%0d", regc); end
      expect_busy(1'b1, "cycle 4");
      @(negedge clk);
      expect3("cycle 4", x1, 8'(x1 + x2), 8'(x1 + x2));
      expect_busy(1'b0, "after");
      in = 8'($urandom);
      repeat (2) @(negedge clk);
      expect3("hold", x1, 8'(x1 + x2), 8'(x1 + x2));
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
