// cmp_add_ctrl: control unit of the subtraction-based GCD engine (the "mygcd"
// schedule).
//
// A ten-state machine. After reset it leaves ST_START, reads the two operands
// into register 0 and register 1 (ST_READ1, ST_READ2), loads the comparator
// (ST_INIT_COMP) and then loops over three states per subtraction step:
//   greater (reg0 > reg1): LOAD_ADD_L0 -> LOAD_ADD_R1 -> SUB_COMP
//   less    (reg0 < reg1): LOAD_ADD_L1 -> LOAD_ADD_R0 -> SUB_COMP
// until the comparator reports equal, then enters ST_FINISHED and goes back
// to ST_READ1 for the next operand pair. The key to the short loop is that the
// register file can be read and written in one cycle: LOAD_ADD_R1 reads reg1
// into add_r and cmp_l while copying it into reg0, and SUB_COMP writes the
// difference into reg1 and cmp_r at once. After every step reg0 holds the
// smaller value and reg1 the difference. The first step takes 6 cycles
// (READ1 .. SUB_COMP), every later one 3; a pair that needs k subtractions
// spends 3 + 3k cycles from READ1 to FINISHED.
//
// Timing: the datapath controls are decoded combinationally from next_state,
// so the operation a state names is carried out at the clock edge that enters
// it. req and ready are registered from next_state: req is high during
// ST_START (from reset), ST_READ1 and ST_FINISHED, asking the source for a new
// word, which the datapath takes at the next rising edge; ready is high during
// ST_FINISHED, when data_out (read port at reg1) holds the result.
// Reset is asynchronous and active high.
//
// States, transitions, control values and req/ready follow the original description. Where
// the original leaves a control as don't-care this unit drives enables and
// write-select to 0 (no load, no write), selects to the register-file source,
// and both addresses to 0; with rd_addr at 0 data_out shows reg0 (the smaller
// value) in those cycles, which reproduces the output sequence of the
// reference waveform (16, 4, 16, 4, 4, 12, 4, 4, 8, 4, ... for inputs 16, 4).
// In this schedule sub is always 1 and add_l_sel, add_r_sel and cmp_l_sel
// are always 0, so those outputs are constant; they are kept because the
// datapath offers them and another schedule could use them.
module cmp_add_ctrl
  import gcd_pkg::*;
(
  input  logic     clk,
  input  logic     reset,
  input  logic     equal,
  input  logic     greater,
  output dp_ctrl_t ctrl,
  output logic     req,
  output logic     ready,
  output state_e   state
);

  state_e current_state, next_state;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      current_state <= ST_START;
      req           <= 1'b1;
      ready         <= 1'b0;
    end else begin
      current_state <= next_state;
      req           <= (next_state == ST_READ1) || (next_state == ST_FINISHED);
      ready         <= (next_state == ST_FINISHED);
    end
  end

  assign state = current_state;

  // Handshake rules: a result is only offered while a new word is requested,
  // and the register file is never written in the start or finished states.
  a_ready_req: assert property (@(posedge clk) disable iff (reset) ready |-> req);
  a_no_write:  assert property (@(posedge clk) disable iff (reset)
                 (current_state inside {ST_START, ST_FINISHED}) |-> ctrl.wr_sel_en inside {WR_NONE, WR_DIN});

  // Next-state logic.
  always_comb begin
    next_state = current_state;
    unique case (current_state)
      ST_START:       next_state = ST_READ1;
      ST_READ1:       next_state = ST_READ2;
      ST_READ2:       next_state = ST_INIT_COMP;
      ST_INIT_COMP,
      ST_SUB_COMP: begin
        if (equal)        next_state = ST_FINISHED;
        else if (greater) next_state = ST_LOAD_ADD_L0;
        else              next_state = ST_LOAD_ADD_L1;
      end
      ST_LOAD_ADD_L0: next_state = ST_LOAD_ADD_R1;
      ST_LOAD_ADD_L1: next_state = ST_LOAD_ADD_R0;
      ST_LOAD_ADD_R0: next_state = ST_SUB_COMP;
      ST_LOAD_ADD_R1: next_state = ST_SUB_COMP;
      ST_FINISHED:    next_state = ST_READ1;
      default:        next_state = ST_START;
    endcase
  end

  // Control decode from next_state.
  always_comb begin
    ctrl           = '0;
    ctrl.add_l_sel = SRC_RF;
    ctrl.add_r_sel = SRC_RF;
    ctrl.cmp_l_sel = SRC_RF;
    ctrl.cmp_r_sel = SRC_RF;
    ctrl.sub       = 1'b1;
    ctrl.rd_addr   = 2'd0;
    ctrl.wr_addr   = 2'd0;
    ctrl.wr_sel_en = WR_NONE;
    unique case (next_state)
      ST_READ1: begin                       // reg0 <= data_in
        ctrl.wr_addr   = 2'd0;
        ctrl.wr_sel_en = WR_DIN;
      end
      ST_READ2: begin                       // reg1 <= data_in, cmp_l <= reg0
        ctrl.rd_addr   = 2'd0;
        ctrl.cmp_l_en  = 1'b1;
        ctrl.wr_addr   = 2'd1;
        ctrl.wr_sel_en = WR_DIN;
      end
      ST_INIT_COMP: begin                   // cmp_r <= reg1
        ctrl.rd_addr   = 2'd1;
        ctrl.cmp_r_en  = 1'b1;
      end
      ST_LOAD_ADD_L0: begin                 // add_l <= reg0
        ctrl.rd_addr   = 2'd0;
        ctrl.add_l_en  = 1'b1;
      end
      ST_LOAD_ADD_L1: begin                 // add_l <= reg1
        ctrl.rd_addr   = 2'd1;
        ctrl.add_l_en  = 1'b1;
      end
      ST_LOAD_ADD_R0: begin                 // add_r, cmp_l <= reg0
        ctrl.rd_addr   = 2'd0;
        ctrl.add_r_en  = 1'b1;
        ctrl.cmp_l_en  = 1'b1;
      end
      ST_LOAD_ADD_R1: begin                 // add_r, cmp_l <= reg1; reg0 <= reg1
        ctrl.rd_addr   = 2'd1;
        ctrl.add_r_en  = 1'b1;
        ctrl.cmp_l_en  = 1'b1;
        ctrl.wr_addr   = 2'd0;
        ctrl.wr_sel_en = WR_COPY;
      end
      ST_SUB_COMP: begin                    // reg1, cmp_r <= add_l - add_r
        ctrl.cmp_r_sel = SRC_ADD;
        ctrl.cmp_r_en  = 1'b1;
        ctrl.wr_addr   = 2'd1;
        ctrl.wr_sel_en = WR_SUB;
      end
      ST_FINISHED: begin                    // show reg1 on data_out
        ctrl.rd_addr   = 2'd1;
      end
      default: ;                            // ST_START: nothing happens
    endcase
  end

endmodule
