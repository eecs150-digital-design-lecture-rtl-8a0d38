// Testbench of the load-enable register: random LD and D for 500 clocks,
// Q compared after every edge with a model that keeps the last loaded
// value. The first clock loads so that the model starts from a known value.
module tb_ld_reg;
  logic        clk = 1'b0;
  logic        ld;
  logic [7:0]  d, q, model;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  ld_reg dut (.clk, .ld, .d, .q);

  initial begin
    ld = 1'b1;
    d  = 8'hA5;
    model = 8'hA5;
    @(posedge clk);
    repeat (500) begin
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL: q=%h expected %h", q, model);
      end
      ld = 1'($urandom);
      d  = 8'($urandom);
      if (ld) model = d;
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
