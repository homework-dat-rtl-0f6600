// siso_gen: single-input single-output GCD engine (Euclid by repeated
// subtraction), built from the control unit cmp_add_ctrl and the datapath
// cmp_add_dp.
//
// Interface: the engine raises req when it wants an input word; the source
// places the word on data_in while req is high and the engine takes it at the
// next rising clock edge. Two words are taken per operation (the first while
// the engine is in its start or finished state, the second in the following
// cycle). The engine then subtracts the smaller value from the larger until
// they are equal and raises ready for one cycle with the GCD on data_out.
// Between words data_out shows the register-file word being read.
// A pair needing k subtractions takes 3 + 3k cycles from the capture of the
// first word to ready; back-to-back pairs add one cycle (the finished state,
// which overlaps the capture of the next first word).
// Both operands must be non-zero: with a zero operand the subtraction never
// reaches equality and ready never rises.
// Reset is asynchronous and active high. The structure (control unit plus
// datapath) and WORD_LENGTH = 16 follow the original description.
module siso_gen
  import gcd_pkg::*;
#(
  parameter int unsigned WORD_LENGTH = 16
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic [WORD_LENGTH-1:0] data_in,
  output logic [WORD_LENGTH-1:0] data_out,
  output logic                   req,
  output logic                   ready
);

  dp_ctrl_t ctrl;
  logic     equal, greater;

  cmp_add_ctrl cn (
    .clk, .reset, .equal, .greater, .ctrl, .req, .ready, .state()
  );

  cmp_add_dp #(.WORD_LENGTH(WORD_LENGTH)) dp (
    .clk, .reset, .ctrl, .data_in, .data_out, .equal, .greater
  );

endmodule
