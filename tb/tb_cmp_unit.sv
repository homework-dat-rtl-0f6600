// tb_cmp_unit: self-checking testbench of cmp_unit.
// Loads cmp_l and cmp_r from either source with random enables and checks
// equal and greater against a reference model; about a third of the loads
// copy the other register's value so that equality occurs often.
module tb_cmp_unit;
  import gcd_pkg::*;
  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic         reset;
  src_e         cmp_l_sel, cmp_r_sel;
  logic         cmp_l_en, cmp_r_en;
  logic [W-1:0] rf_data, add_data;
  logic         equal, greater;
  logic [W-1:0] m_l, m_r;
  int checks = 0, failures = 0, n_eq = 0, n_gt = 0, n_lt = 0;

  cmp_unit #(.WORD_LENGTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmp_l_sel = SRC_RF; cmp_r_sel = SRC_RF; cmp_l_en = 0; cmp_r_en = 0;
    rf_data = '0; add_data = '0;
    reset = 1'b0; m_l = '0; m_r = '0;
    #1 reset = 1'b1;
    #12 reset = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (equal !== (m_l == m_r) || greater !== (m_l > m_r)) begin
        failures++;
        $display("FAIL l=%h r=%h equal=%0b greater=%0b", m_l, m_r, equal, greater);
      end
      if (m_l == m_r) n_eq++; else if (m_l > m_r) n_gt++; else n_lt++;
      cmp_l_en  = 1'($urandom_range(0, 1));
      cmp_r_en  = 1'($urandom_range(0, 1));
      cmp_l_sel = src_e'($urandom_range(0, 1));
      cmp_r_sel = src_e'($urandom_range(0, 1));
      rf_data   = ($urandom_range(0, 2) == 0) ? m_r : W'($urandom);
      add_data  = ($urandom_range(0, 2) == 0) ? m_l : W'($urandom);
      @(posedge clk);
      if (cmp_l_en) m_l = (cmp_l_sel == SRC_ADD) ? add_data : rf_data;
      if (cmp_r_en) m_r = (cmp_r_sel == SRC_ADD) ? add_data : rf_data;
    end
    checks++;
    if (n_eq == 0 || n_gt == 0 || n_lt == 0) begin
      failures++;
      $display("FAIL coverage eq=%0d gt=%0d lt=%0d", n_eq, n_gt, n_lt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
