// tb_cmp_add_dp: self-checking testbench of cmp_add_dp.
// Applies random control bundles and input words and compares data_out,
// equal and greater every cycle with a reference model of the register file,
// the write multiplexer and the four operand registers. It also checks that
// reset clears the register file and the operand registers.
module tb_cmp_add_dp;
  import gcd_pkg::*;
  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic         reset;
  dp_ctrl_t     ctrl;
  logic [W-1:0] data_in, data_out;
  logic         equal, greater;

  logic [W-1:0] rf [4];
  logic [W-1:0] a_l, a_r, c_l, c_r, res, rd;
  int checks = 0, failures = 0;

  cmp_add_dp #(.WORD_LENGTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0; ctrl.wr_sel_en = WR_NONE; data_in = '0;
    reset = 1'b0;
    #1 reset = 1'b1;
    for (int i = 0; i < 4; i++) rf[i] = '0;
    a_l = '0; a_r = '0; c_l = '0; c_r = '0;
    #12 reset = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      ctrl           = dp_ctrl_t'($urandom);
      ctrl.wr_sel_en = wr_sel_e'($urandom_range(0, 3));
      // small values make equality and wrap-around frequent
      data_in = (n % 2 == 0) ? W'($urandom_range(0, 7)) : W'($urandom);
      #1;
      rd  = rf[ctrl.rd_addr];
      res = ctrl.sub ? a_l - a_r : a_l + a_r;
      checks++;
      if (data_out !== rd || equal !== (c_l == c_r) || greater !== (c_l > c_r)) begin
        failures++;
        $display("FAIL n=%0d data_out=%h/%h equal=%0b greater=%0b c_l=%h c_r=%h",
                 n, data_out, rd, equal, greater, c_l, c_r);
      end
      @(posedge clk);
      unique case (ctrl.wr_sel_en)
        WR_SUB:  rf[ctrl.wr_addr] = res;
        WR_COPY: rf[ctrl.wr_addr] = rd;
        WR_DIN:  rf[ctrl.wr_addr] = data_in;
        default: ;
      endcase
      if (ctrl.add_l_en) a_l = (ctrl.add_l_sel == SRC_ADD) ? res : rd;
      if (ctrl.add_r_en) a_r = (ctrl.add_r_sel == SRC_ADD) ? res : rd;
      if (ctrl.cmp_l_en) c_l = (ctrl.cmp_l_sel == SRC_ADD) ? res : rd;
      if (ctrl.cmp_r_en) c_r = (ctrl.cmp_r_sel == SRC_ADD) ? res : rd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
