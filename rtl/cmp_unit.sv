// cmp_unit: magnitude comparator with its two operand registers cmp_l and cmp_r.
//
// Each operand register loads, under its own enable, either the register-file
// read word or the adder result (see op_reg). The flags are combinational from
// the registers: equal = (cmp_l == cmp_r), greater = (cmp_l > cmp_r), both
// unsigned. In the GCD schedule cmp_l tracks register 0 (the smaller value)
// and cmp_r tracks register 1 (the latest difference), so the flags are ready
// one cycle after a difference is written. The registers, their controls and
// the two flags follow the original description; the unsigned compare and the adder-result
// source for cmp_l are this design's choice.
module cmp_unit
  import gcd_pkg::*;
#(
  parameter int unsigned WORD_LENGTH = 16
) (
  input  logic                   clk,
  input  logic                   reset,
  input  src_e                   cmp_l_sel,
  input  logic                   cmp_l_en,
  input  src_e                   cmp_r_sel,
  input  logic                   cmp_r_en,
  input  logic [WORD_LENGTH-1:0] rf_data,
  input  logic [WORD_LENGTH-1:0] add_data,
  output logic                   equal,
  output logic                   greater
);

  logic [WORD_LENGTH-1:0] cmp_l, cmp_r;

  op_reg #(.WORD_LENGTH(WORD_LENGTH)) u_cmp_l (
    .clk, .reset, .sel(cmp_l_sel), .en(cmp_l_en),
    .rf_data, .add_data, .q(cmp_l)
  );

  op_reg #(.WORD_LENGTH(WORD_LENGTH)) u_cmp_r (
    .clk, .reset, .sel(cmp_r_sel), .en(cmp_r_en),
    .rf_data, .add_data, .q(cmp_r)
  );

  assign equal   = (cmp_l == cmp_r);
  assign greater = (cmp_l >  cmp_r);

endmodule
