// add_unit: adder/subtractor with its two operand registers add_l and add_r.
//
// Each operand register loads, under its own enable, either the register-file
// read word or the unit's own result (see op_reg). The result is
// combinational: add_l - add_r when sub is high, add_l + add_r otherwise,
// modulo 2^WORD_LENGTH. In the GCD schedule the control unit always holds sub
// high and loads the larger value into add_l, so the result is the
// non-negative difference, available the cycle after add_r is loaded.
// The registers and sub line follow the original description; the result feedback into
// the operand registers is this design's choice (the GCD schedule never uses it).
module add_unit
  import gcd_pkg::*;
#(
  parameter int unsigned WORD_LENGTH = 16
) (
  input  logic                   clk,
  input  logic                   reset,
  input  src_e                   add_l_sel,
  input  logic                   add_l_en,
  input  src_e                   add_r_sel,
  input  logic                   add_r_en,
  input  logic                   sub,
  input  logic [WORD_LENGTH-1:0] rf_data,
  output logic [WORD_LENGTH-1:0] result
);

  logic [WORD_LENGTH-1:0] add_l, add_r;

  op_reg #(.WORD_LENGTH(WORD_LENGTH)) u_add_l (
    .clk, .reset, .sel(add_l_sel), .en(add_l_en),
    .rf_data, .add_data(result), .q(add_l)
  );

  op_reg #(.WORD_LENGTH(WORD_LENGTH)) u_add_r (
    .clk, .reset, .sel(add_r_sel), .en(add_r_en),
    .rf_data, .add_data(result), .q(add_r)
  );

  always_comb begin
    if (sub) result = add_l - add_r;
    else     result = add_l + add_r;
  end

endmodule
