// tb_add_unit: self-checking testbench of add_unit.
// Loads random operands into add_l and add_r from the register-file input or
// from the unit's own result, holds them with the enables low, and checks the
// sum and the difference against a reference model of the two registers.
module tb_add_unit;
  import gcd_pkg::*;
  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic         reset;
  src_e         add_l_sel, add_r_sel;
  logic         add_l_en, add_r_en, sub;
  logic [W-1:0] rf_data, result;
  logic [W-1:0] m_l, m_r, exp_res;
  int checks = 0, failures = 0;

  add_unit #(.WORD_LENGTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    add_l_sel = SRC_RF; add_r_sel = SRC_RF; add_l_en = 0; add_r_en = 0;
    sub = 1; rf_data = '0;
    reset = 1'b0; m_l = '0; m_r = '0;
    #1 reset = 1'b1;
    #12 reset = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      sub       = $urandom_range(0, 3) != 0;
      rf_data   = W'($urandom);
      add_l_en  = 1'($urandom_range(0, 1));
      add_r_en  = 1'($urandom_range(0, 1));
      add_l_sel = src_e'($urandom_range(0, 3) == 0);
      add_r_sel = src_e'($urandom_range(0, 3) == 0);
      #1;
      exp_res = sub ? m_l - m_r : m_l + m_r;
      checks++;
      if (result !== exp_res) begin
        failures++;
        $display("FAIL n=%0d sub=%0b l=%h r=%h got %h", n, sub, m_l, m_r, result);
      end
      @(posedge clk);
      if (add_l_en) m_l = (add_l_sel == SRC_ADD) ? exp_res : rf_data;
      if (add_r_en) m_r = (add_r_sel == SRC_ADD) ? exp_res : rf_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
