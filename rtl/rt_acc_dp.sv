// Datapath of the R0/R1/ACC register-transfer example.
//
// Two registers R0 and R1, each behind a 2:1 multiplexer (S0, S1) whose
// input 1 is the register itself (hold) and whose input 0 is a common bus.
// S2 picks R0 (0) or R1 (1) as the operand of an adder whose other operand
// is ACC; the sum goes to ACC. S3 drives the bus with that operand (0) or
// with ACC (1). This supports the transfers
//   ACC <= ACC + R0/R1,  R0 <= R1/ACC,  R1 <= R0/ACC
// in any combination the multiplexers allow within one clock.
// This design's additions: ACC loads only when LD_ACC is high (the example
// sequence leaves ACC unchanged in its last cycle), and LOAD, which has
// priority, sets R0, R1 and ACC from the INIT inputs so that a sequence can
// start from known values. No reset.
module rt_acc_dp #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         s0,
  input  logic         s1,
  input  logic         s2,
  input  logic         s3,
  input  logic         ld_acc,
  input  logic         load,
  input  logic [W-1:0] r0_init,
  input  logic [W-1:0] r1_init,
  input  logic [W-1:0] acc_init,
  output logic [W-1:0] r0,
  output logic [W-1:0] r1,
  output logic [W-1:0] acc
);

  logic [W-1:0] operand, bus;

  assign operand = s2 ? r1 : r0;
  assign bus     = s3 ? acc : operand;

  always_ff @(posedge clk) begin
    if (load) begin
      r0  <= r0_init;
      r1  <= r1_init;
      acc <= acc_init;
    end else begin
      r0 <= s0 ? r0 : bus;
      r1 <= s1 ? r1 : bus;
      if (ld_acc) acc <= acc + operand;
    end
  end

endmodule
