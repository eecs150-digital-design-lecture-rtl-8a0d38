// Testbench of the list memory: fills all 256 words through the write
// port, then reads every word back in random order through the read
// address, checking that D follows A in the same cycle (asynchronous read),
// and that a read address is ignored while WE is high.
module tb_list_mem;
  logic       clk = 1'b0;
  logic [7:0] a, d, wa, wd;
  logic       we;
  logic [7:0] model [256];
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  list_mem dut (.clk, .a, .d, .we, .wa, .wd);

  initial begin
    we = 1'b0; a = '0; wa = '0; wd = '0;
    @(negedge clk);
    we = 1'b1;
    for (int i = 0; i < 256; i++) begin
      wa = 8'(i);
      wd = 8'($urandom);
      a  = 8'($urandom);  // must not matter while writing
      model[i] = wd;
      @(negedge clk);
    end
    we = 1'b0;
    repeat (1000) begin
      a = 8'($urandom);
      #1;
      checks++;
      if (d !== model[a]) begin
        failures++;
        $display("FAIL: Memory[%0d]=%h expected %h", a, d, model[a]);
      end
    end
    // Overwrite one word and read it back.
    @(negedge clk);
    we = 1'b1; wa = 8'h42; wd = 8'h5A;
    @(negedge clk);
    we = 1'b0; a = 8'h42;
    #1;
    checks++;
    if (d !== 8'h5A) begin
      failures++;
      $display("FAIL: overwrite read %h", d);
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
