// Testbench of the architecture #1-#3 controller: drives START and
// NEXT_ZERO at random for 2000 clocks and compares the state and every
// control output with a reference written from the state table:
//   START=1 -> START from any state; START -> COMPUTE_SUM;
//   COMPUTE_SUM -> GET_NEXT; GET_NEXT -> DONE if NEXT_ZERO else COMPUTE_SUM;
//   DONE -> DONE.
// Also counts that every transition happened at least once.
module tb_lp_ctrl;
  import lp_pkg::*;

  logic      clk = 1'b0;
  logic      start, next_zero;
  lp_ctrl_t  ctl, exp_ctl;
  lp_state_e state, model;
  int        checks = 0, failures = 0;
  int        n_loop = 0, n_done = 0, n_restart = 0;

  always #5 clk = ~clk;

  lp_ctrl dut (.clk, .start, .next_zero, .ctl, .state);

  // {ld_sum, sum_sel, ld_next, next_sel, a_sel, add_sel, done}
  function automatic lp_ctrl_t expected(lp_state_e s);
    case (s)
      ST_START:       return 7'b1_0_1_0_0_0_0;
      ST_COMPUTE_SUM: return 7'b1_1_0_0_1_1_0;
      ST_GET_NEXT:    return 7'b0_0_1_1_0_0_0;
      default:        return 7'b0_0_0_0_0_0_1;
    endcase
  endfunction

  initial begin
    start = 1'b1;
    next_zero = 1'b0;
    @(negedge clk);
    model = ST_START;
    repeat (2000) begin
      checks++;
      exp_ctl = expected(model);
      if (state !== model || ctl !== exp_ctl) begin
        failures++;
        $display("FAIL: state=%b ctl=%b expected %b %b", state, ctl, model, exp_ctl);
      end
      start     = ($urandom % 16) == 0;
      next_zero = ($urandom % 4) == 0;
      if (start) begin
        if (model != ST_START) n_restart++;
        model = ST_START;
      end else begin
        case (model)
          ST_START:       model = ST_COMPUTE_SUM;
          ST_COMPUTE_SUM: model = ST_GET_NEXT;
          ST_GET_NEXT: begin
            model = next_zero ? ST_DONE : ST_COMPUTE_SUM;
            if (next_zero) n_done++; else n_loop++;
          end
          default:        model = ST_DONE;
        endcase
      end
      @(negedge clk);
    end
    checks++;
    if (n_loop == 0 || n_done == 0 || n_restart == 0) begin
      failures++;
      $display("FAIL: transitions not all seen loop=%0d done=%0d restart=%0d",
               n_loop, n_done, n_restart);
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
