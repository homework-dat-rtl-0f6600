// tb_siso_gen: end-to-end testbench of the GCD engine siso_gen at its default
// parameters (16-bit words).
//
// A source process plays the test-vector generator: at each falling clock
// edge with req high it puts the next operand on data_in. A sink process
// takes data_out whenever ready is high and compares it with a GCD computed
// in the testbench. For every operand pair it also checks the latency: with k
// subtraction steps, 3 + 3k cycles from entering read1 to entering finished
// (6 cycles for the first step, 3 for every later one). The first pair is
// 16, 4, for which the whole data_out/req/ready trace is compared cycle by
// cycle with the reference waveform. Then come corner pairs (equal operands,
// 1, the largest word) and random pairs, run back to back. The testbench
// counts how often each mechanism of the schedule occurs (greater branch,
// less branch, immediate equality, register copy, back-to-back restart) and
// fails if one never occurs.
module tb_siso_gen;
  import gcd_pkg::*;
  localparam int unsigned W = 16;
  localparam int NRAND = 300;

  logic         clk = 1'b0;
  logic         reset = 1'b0;
  logic [W-1:0] data_in, data_out;
  logic         req, ready;

  int checks = 0, failures = 0;
  logic [W-1:0] words[$];     // operand stream for the source
  logic [W-1:0] exp_gcd[$];   // expected results, in order
  int           exp_cyc[$];   // expected read1-to-finished cycle counts
  int n_results = 0;
  int n_gt = 0, n_lt = 0, n_eq_init = 0, n_copy = 0, n_b2b = 0;
  int cyc = 0, t_read1 = 0;

  siso_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d results", n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Reference: Euclid by subtraction, counting the steps.
  task automatic add_pair(input logic [W-1:0] a, input logic [W-1:0] b);
    int unsigned x = 32'(a), y = 32'(b), k = 0;
    while (x != y) begin
      if (x > y) x = x - y; else y = y - x;
      k++;
    end
    words.push_back(a);
    words.push_back(b);
    exp_gcd.push_back(W'(x));
    exp_cyc.push_back(3 + 3 * int'(k));
  endtask

  // Source: present a new word on every falling edge while req is high.
  always @(negedge clk) begin
    if (!reset && req && words.size() > 0) data_in <= words.pop_front();
  end

  // Cycle counter, mechanism counters and result sink.
  state_e       prev_state = ST_START;
  logic [W-1:0] e_gcd;
  int           e_cyc;
  always @(posedge clk) begin
    #1;
    if (!reset) begin
      cyc++;
      if (dut.cn.state == ST_READ1) begin
        t_read1 = cyc;
        if (prev_state == ST_FINISHED) n_b2b++;
      end
      if (dut.cn.state == ST_LOAD_ADD_L0) n_gt++;
      if (dut.cn.state == ST_LOAD_ADD_L1) n_lt++;
      if (dut.cn.state == ST_LOAD_ADD_R1) n_copy++;
      if (dut.cn.state == ST_FINISHED && prev_state == ST_INIT_COMP) n_eq_init++;
      if (ready) begin
        chk(exp_gcd.size() > 0, "unexpected result");
        if (exp_gcd.size() > 0) begin
          e_gcd = exp_gcd.pop_front();
          e_cyc = exp_cyc.pop_front();
          chk(data_out == e_gcd, $sformatf("result %0d: gcd %0d expected %0d", n_results, data_out, e_gcd));
          chk(cyc - t_read1 == e_cyc, $sformatf("result %0d: %0d cycles expected %0d",
                                             n_results, cyc - t_read1, e_cyc));
        end
        n_results++;
      end
      prev_state = dut.cn.state;
    end
  end

  // Reference trace for 16, 4 (one entry per cycle, from the start state):
  // data_out, req, ready.
  localparam int TRACE_LEN = 14;
  localparam logic [W-1:0] TR_DOUT [TRACE_LEN] =
    '{0, 16, 4, 16, 4, 4, 12, 4, 4, 8, 4, 4, 4, 4};
  localparam logic TR_REQ [TRACE_LEN] =
    '{1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1};
  localparam logic TR_READY [TRACE_LEN] =
    '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1};

  initial begin
    data_in = '0;
    add_pair(16, 4);
    add_pair(7, 7);
    add_pair(1, 1);
    add_pair(65535, 65535);
    add_pair(3, 12);
    add_pair(65535, 1);
    add_pair(1, 65535);
    add_pair(65535, 32768);
    add_pair(48, 18);
    add_pair(18, 48);
    for (int i = 0; i < NRAND; i++) begin
      logic [W-1:0] a, b;
      int unsigned  g;
      if (i % 3 == 0) begin
        a = W'($urandom_range(1, 255));
        b = W'($urandom_range(1, 255));
      end else if (i % 3 == 1) begin
        g = $urandom_range(1, 300);
        a = W'(g * $urandom_range(1, 200));
        b = W'(g * $urandom_range(1, 200));
      end else begin
        a = W'($urandom_range(1, 65535));
        b = W'($urandom_range(1, 65535));
      end
      add_pair(a, b);
    end

    #1 reset = 1'b1;
    #8;
    chk(data_out == 0 && req && !ready, "reset values");
    @(negedge clk);
    reset = 1'b0;
    // cycle-by-cycle comparison with the reference trace of 16, 4
    for (int i = 0; i < TRACE_LEN; i++) begin
      #1;
      chk(data_out == TR_DOUT[i] && req == TR_REQ[i] && ready == TR_READY[i],
          $sformatf("16,4 trace cycle %0d: data_out=%0d req=%0b ready=%0b", i, data_out, req, ready));
      @(negedge clk);
    end
    wait (exp_gcd.size() == 0);
    repeat (3) @(negedge clk);
    chk(n_results == 10 + NRAND, "number of results");
    chk(n_gt > 0,      "greater branch never taken");
    chk(n_lt > 0,      "less branch never taken");
    chk(n_eq_init > 0, "equality at init_comp never seen");
    chk(n_copy > 0,    "register copy never done");
    chk(n_b2b > 0,     "back-to-back operation never run");
    $display("results=%0d greater=%0d less=%0d eq_at_init=%0d copy=%0d back_to_back=%0d cycles=%0d",
             n_results, n_gt, n_lt, n_eq_init, n_copy, n_b2b, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
