// tb_reg_file: self-checking testbench of reg_file.
// Checks that reset clears every word, then applies random writes and reads
// (including a read and a write of the same word in one cycle, which must
// return the old value) against a reference array kept in the testbench.
module tb_reg_file;
  localparam int unsigned W = 16;
  localparam int unsigned N = 4;

  logic         clk = 1'b0;
  logic         reset;
  logic [1:0]   rd_addr, wr_addr;
  logic [W-1:0] rd_data, wr_data;
  logic         we;
  logic [W-1:0] model [N];
  int checks = 0, failures = 0;

  reg_file #(.WORD_LENGTH(W), .NREGS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 1'b0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    reset = 1'b0;
    #1 reset = 1'b1;
    #12 reset = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      model[i] = '0;
      rd_addr = 2'(i); #1;
      check(rd_data, '0, "after reset");
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we      = $urandom_range(0, 2) != 0;
      wr_addr = 2'($urandom);
      wr_data = W'($urandom);
      rd_addr = (n % 3 == 0) ? wr_addr : 2'($urandom);
      #1;
      check(rd_data, model[rd_addr], "read before edge");
      @(posedge clk);
      if (we) model[wr_addr] = wr_data;
      #1;
      check(rd_data, model[rd_addr], "read after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
