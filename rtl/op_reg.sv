// op_reg: operand register with a two-way input multiplexer and a load enable.
//
// On a rising clock edge with en high the register takes rf_data (sel =
// SRC_RF) or add_data (sel = SRC_ADD); otherwise it holds. Reset is
// asynchronous, active high, and clears it to zero. Used for the four operand
// registers add_l, add_r, cmp_l and cmp_r of the datapath. The two sources
// and the zero reset value are this design's choice; the select/enable pair
// per register follows the control unit's outputs.
module op_reg
  import gcd_pkg::*;
#(
  parameter int unsigned WORD_LENGTH = 16
) (
  input  logic                   clk,
  input  logic                   reset,
  input  src_e                   sel,
  input  logic                   en,
  input  logic [WORD_LENGTH-1:0] rf_data,
  input  logic [WORD_LENGTH-1:0] add_data,
  output logic [WORD_LENGTH-1:0] q
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)   q <= '0;
    else if (en) q <= (sel == SRC_ADD) ? add_data : rf_data;
  end

endmodule
