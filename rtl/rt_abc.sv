// Register-transfer example: datapath deduced from a transfer sequence.
//
// The sequence
//   regA <= IN; regB <= IN; regC <= regA + regB; regB <= regC
// needs IN to fan out to regA and regB, an adder on regA and regB feeding
// regC, and a multiplexer in front of regB choosing IN (B_SEL=0) or regC
// (B_SEL=1). Each register has a load enable (LD_A, LD_B, LD_C); that is all
// the datapath holds. A four-state controller issues one transfer per clock.
// Interface (this design's own): GO in IDLE starts the sequence; IN is
// sampled in the first cycle into regA and in the second into regB; BUSY is
// high for the four sequence cycles; the registers keep their values after.
// There is no reset: INIT returns the controller to IDLE from any state and
// must be given once before the first GO.
module rt_abc #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         init,
  input  logic         go,
  input  logic [W-1:0] in,
  output logic         busy,
  output logic [W-1:0] rega,
  output logic [W-1:0] regb,
  output logic [W-1:0] regc
);

  typedef enum logic [2:0] {IDLE, T_A, T_B, T_C, T_BC} state_e;
  state_e state, state_n;
  logic   ld_a, ld_b, ld_c, b_sel;
  logic [W-1:0] sum, b_d;

  always_ff @(posedge clk) state <= state_n;

  always_comb begin
    unique case (state)
      IDLE:    state_n = go ? T_A : IDLE;
      T_A:     state_n = T_B;
      T_B:     state_n = T_C;
      T_C:     state_n = T_BC;
      default: state_n = IDLE;
    endcase
    if (init) state_n = IDLE;
  end

  always_comb begin
    ld_a = 1'b0; ld_b = 1'b0; ld_c = 1'b0; b_sel = 1'b0;
    unique case (state)
      T_A:  ld_a = 1'b1;
      T_B:  ld_b = 1'b1;
      T_C:  ld_c = 1'b1;
      T_BC: begin ld_b = 1'b1; b_sel = 1'b1; end
      default: ;
    endcase
  end

  assign busy = (state != IDLE);
  assign sum  = rega + regb;
  assign b_d  = b_sel ? regc : in;

  ld_reg #(.W(W)) u_a (.clk, .ld(ld_a), .d(in),  .q(rega));
  ld_reg #(.W(W)) u_b (.clk, .ld(ld_b), .d(b_d), .q(regb));
  ld_reg #(.W(W)) u_c (.clk, .ld(ld_c), .d(sum), .q(regc));

endmodule
