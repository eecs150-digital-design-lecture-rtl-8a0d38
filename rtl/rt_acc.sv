// Register-transfer example: an accumulator datapath sequenced by an FSM.
//
// The controller plays this three-cycle register-transfer sequence on the
// R0/R1/ACC datapath (rt_acc_dp):
//   cycle 1: ACC <= ACC + R0, R1 <= R0
//   cycle 2: ACC <= ACC + R1, R0 <= R1
//   cycle 3: R0 <= ACC
// Each cycle is one controller state whose outputs are the multiplexer
// selects S0-S3 (and LD_ACC):
//   cycle 1: S2=0 S3=0 S1=0 S0=1 LD_ACC=1
//   cycle 2: S2=1 S3=0 S0=0 S1=1 LD_ACC=1
//   cycle 3: S3=1 S0=0 S1=1      LD_ACC=0
// Interface (this design's own): LOAD sets R0, R1, ACC from the INIT inputs
// and returns the controller to IDLE; GO in IDLE starts the sequence on the
// next clock; BUSY is high during the three sequence cycles. The registers
// hold the results after BUSY falls. Outputs are registered.
module rt_acc #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         load,
  input  logic [W-1:0] r0_init,
  input  logic [W-1:0] r1_init,
  input  logic [W-1:0] acc_init,
  input  logic         go,
  output logic         busy,
  output logic [W-1:0] r0,
  output logic [W-1:0] r1,
  output logic [W-1:0] acc
);

  typedef enum logic [1:0] {IDLE, C1, C2, C3} state_e;
  state_e state, state_n;
  logic   s0, s1, s2, s3, ld_acc;

  always_ff @(posedge clk) state <= state_n;

  always_comb begin
    unique case (state)
      IDLE:    state_n = go ? C1 : IDLE;
      C1:      state_n = C2;
      C2:      state_n = C3;
      default: state_n = IDLE;
    endcase
    if (load) state_n = IDLE;
  end

  // Selects: 1 on S0/S1 holds the register.
  always_comb begin
    s0 = 1'b1; s1 = 1'b1; s2 = 1'b0; s3 = 1'b0; ld_acc = 1'b0;
    unique case (state)
      C1: begin s2 = 1'b0; s3 = 1'b0; s1 = 1'b0; ld_acc = 1'b1; end
      C2: begin s2 = 1'b1; s3 = 1'b0; s0 = 1'b0; ld_acc = 1'b1; end
      C3: begin s3 = 1'b1; s0 = 1'b0; end
      default: ;
    endcase
  end

  assign busy = (state != IDLE);

  rt_acc_dp #(.W(W)) u_dp (
    .clk, .s0, .s1, .s2, .s3, .ld_acc, .load,
    .r0_init, .r1_init, .acc_init, .r0, .r1, .acc
  );

endmodule
