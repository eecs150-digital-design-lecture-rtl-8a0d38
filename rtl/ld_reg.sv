// Register with load enable.
//
// On a rising clock edge the register takes D when LD is high and keeps its
// value otherwise: functionally a 2:1 multiplexer in front of a D flip-flop
// whose second input is the register's own output. There is no reset input,
// following the component this models; whatever reads the register must load
// it first. Q changes one clock-to-Q delay after the edge.
module ld_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (ld) q <= d;
  end

endmodule
