// tb_cmp_add_ctrl: self-checking testbench of cmp_add_ctrl.
// Plays the comparator: at every decision point (init_comp and sub_comp) it
// drives equal/greater from a scripted list of outcomes and checks, cycle by
// cycle, the state sequence, the control values the schedule requires for the
// next state (values marked don't-care are masked out, except that no
// register-file write may occur where none is specified), req and ready, and
// the cycle counts: 6 cycles for the first subtraction step (read1 to
// sub_comp) and 3 for every later one.
module tb_cmp_add_ctrl;
  import gcd_pkg::*;

  typedef enum int {D_GT, D_LT, D_EQ} dec_e;

  logic     clk = 1'b0;
  logic     reset;
  logic     equal, greater;
  dp_ctrl_t ctrl;
  logic     req, ready;
  state_e   state;
  int checks = 0, failures = 0;

  cmp_add_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s (state=%s)", $time, what, state.name());
    end
  endtask

  // Required controls while the machine moves into state s.
  task automatic check_ctrl(input state_e s);
    chk(ctrl.sub == 1'b1, "sub");
    case (s)
      ST_READ1: chk(ctrl.wr_addr == 2'd0 && ctrl.wr_sel_en == 2'b11, "read1 ctrl");
      ST_READ2: chk(ctrl.rd_addr == 2'd0 && ctrl.cmp_l_sel == SRC_RF && ctrl.cmp_l_en &&
                    ctrl.wr_addr == 2'd1 && ctrl.wr_sel_en == 2'b11, "read2 ctrl");
      ST_INIT_COMP: chk(ctrl.rd_addr == 2'd1 && !ctrl.cmp_l_en && ctrl.cmp_r_sel == SRC_RF &&
                    ctrl.cmp_r_en && ctrl.wr_sel_en == 2'b00, "init_comp ctrl");
      ST_LOAD_ADD_L0: chk(ctrl.rd_addr == 2'd0 && ctrl.add_l_sel == SRC_RF && ctrl.add_l_en &&
                    ctrl.wr_sel_en == 2'b00, "load_add_l0 ctrl");
      ST_LOAD_ADD_L1: chk(ctrl.rd_addr == 2'd1 && ctrl.add_l_sel == SRC_RF && ctrl.add_l_en &&
                    ctrl.wr_sel_en == 2'b00, "load_add_l1 ctrl");
      ST_LOAD_ADD_R0: chk(ctrl.rd_addr == 2'd0 && !ctrl.add_l_en && ctrl.add_r_sel == SRC_RF &&
                    ctrl.add_r_en && ctrl.cmp_l_sel == SRC_RF && ctrl.cmp_l_en &&
                    ctrl.wr_sel_en == 2'b00, "load_add_r0 ctrl");
      ST_LOAD_ADD_R1: chk(ctrl.rd_addr == 2'd1 && !ctrl.add_l_en && ctrl.add_r_sel == SRC_RF &&
                    ctrl.add_r_en && ctrl.cmp_l_sel == SRC_RF && ctrl.cmp_l_en &&
                    ctrl.wr_addr == 2'd0 && ctrl.wr_sel_en == 2'b10, "load_add_r1 ctrl");
      ST_SUB_COMP: chk(!ctrl.add_l_en && !ctrl.add_r_en && !ctrl.cmp_l_en &&
                    ctrl.cmp_r_sel == SRC_ADD && ctrl.cmp_r_en &&
                    ctrl.wr_addr == 2'd1 && ctrl.wr_sel_en == 2'b01, "sub_comp ctrl");
      ST_FINISHED: chk(ctrl.rd_addr == 2'd1 && ctrl.wr_sel_en == 2'b00, "finished ctrl");
      default: ;
    endcase
  endtask

  // Runs one operation from the current state (start or finished) with the
  // given comparator outcomes; the list must end with D_EQ.
  task automatic run_op(input dec_e decs[$]);
    state_e exp_seq[$];
    int     step_start, cyc;
    exp_seq = {ST_READ1, ST_READ2, ST_INIT_COMP};
    foreach (decs[i]) begin
      if (decs[i] == D_GT)      exp_seq = {exp_seq, ST_LOAD_ADD_L0, ST_LOAD_ADD_R1, ST_SUB_COMP};
      else if (decs[i] == D_LT) exp_seq = {exp_seq, ST_LOAD_ADD_L1, ST_LOAD_ADD_R0, ST_SUB_COMP};
      else                      exp_seq = {exp_seq, ST_FINISHED};
    end
    cyc = 0; step_start = 0;
    begin
      int d = 0;
      foreach (exp_seq[i]) begin
        // drive the comparator outcome for the next decision
        equal   = (decs[d] == D_EQ);
        greater = (decs[d] == D_GT);
        #1;
        check_ctrl(exp_seq[i]);
        @(posedge clk); #1;
        cyc++;
        chk(state == exp_seq[i], $sformatf("expected state %s", exp_seq[i].name()));
        chk(req == (state == ST_READ1 || state == ST_FINISHED), "req");
        chk(ready == (state == ST_FINISHED), "ready");
        if (state == ST_SUB_COMP) begin
          // cycles of this subtraction step, counted from read1 (first) or
          // from the previous sub_comp (later)
          chk(cyc - step_start == ((step_start == 0) ? 6 : 3), "iteration cycle count");
          step_start = cyc;
          d++;
        end
        if (state == ST_INIT_COMP) d = 0;
        @(negedge clk);
      end
      chk(cyc == 3 + 3 * (decs.size() - 1) + 1, "operation length");
    end
  endtask

  initial begin
    equal = 1'b0; greater = 1'b0;
    reset = 1'b0;
    #1 reset = 1'b1;
    #1;
    chk(req == 1'b1 && ready == 1'b0 && state == ST_START, "reset values");
    @(negedge clk);
    reset = 1'b0;
    #1;
    chk(state == ST_START, "still in start");
    // the Figure-style 16,4 operation: greater, then less twice, then equal
    run_op('{D_GT, D_LT, D_LT, D_EQ});
    run_op('{D_EQ});                         // equal operands
    run_op('{D_LT, D_GT, D_GT, D_LT, D_EQ});
    // asynchronous reset in the middle of an operation
    equal = 1'b0; greater = 1'b1;
    repeat (4) @(negedge clk);
    reset = 1'b1; #1;
    chk(state == ST_START && req && !ready, "mid-operation reset");
    @(negedge clk); reset = 1'b0;
    run_op('{D_GT, D_EQ});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
