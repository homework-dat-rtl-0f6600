// reg_file: register file of the GCD datapath.
//
// NREGS words of WORD_LENGTH bits with one read port and one write port. The
// read is combinational (rd_data follows rd_addr in the same cycle); the write
// takes effect at the rising clock edge when we is high. A read and a write in
// the same cycle are both served, the read returning the old contents; the
// control unit relies on this to overlap the two. Only words 0 and 1 are used
// by the GCD algorithm; words 2 and 3 exist but are never addressed.
// Reset (asynchronous, active high) clears every word, matching the cleared
// output the reference waveform shows right after reset. Word count and width follow the
// original description; the asynchronous read and the reset value are this design's choice.
module reg_file #(
  parameter int unsigned WORD_LENGTH = 16,
  parameter int unsigned NREGS       = 4,
  localparam int unsigned AW         = (NREGS > 1) ? $clog2(NREGS) : 1
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic [AW-1:0]          rd_addr,
  output logic [WORD_LENGTH-1:0] rd_data,
  input  logic                   we,
  input  logic [AW-1:0]          wr_addr,
  input  logic [WORD_LENGTH-1:0] wr_data
);

  logic [WORD_LENGTH-1:0] mem [NREGS];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < int'(NREGS); i++) mem[i] <= '0;
    end else if (we) begin
      mem[wr_addr] <= wr_data;
    end
  end

  assign rd_data = mem[rd_addr];

endmodule
