// cmp_add_dp: datapath of the GCD engine.
//
// A four-word register file (reg_file) feeds, through its single read port,
// the adder/subtractor operand registers (add_unit), the comparator operand
// registers (cmp_unit) and the output data_out. The register-file write port
// takes data_in, the subtractor result or the read-port word, as chosen by the
// two-bit wr_sel_en code (see gcd_pkg::wr_sel_e; 00 writes nothing). All
// controls come from cmp_add_ctrl in one dp_ctrl_t bundle, are applied at the
// next rising clock edge and, for rd_addr, show on data_out within the cycle.
// The comparator flags equal and greater go back to the control unit.
// The blocks and control lines follow the original description; data_out taken from the
// read port and the meaning of each wr_sel_en code are this design's reading
// of the waveforms and of the state descriptions.
module cmp_add_dp
  import gcd_pkg::*;
#(
  parameter int unsigned WORD_LENGTH = 16
) (
  input  logic                   clk,
  input  logic                   reset,
  input  dp_ctrl_t               ctrl,
  input  logic [WORD_LENGTH-1:0] data_in,
  output logic [WORD_LENGTH-1:0] data_out,
  output logic                   equal,
  output logic                   greater
);

  logic [WORD_LENGTH-1:0] rd_data, wr_data, add_res;
  logic                   we;

  always_comb begin
    we = (ctrl.wr_sel_en != WR_NONE);
    unique case (ctrl.wr_sel_en)
      WR_SUB:  wr_data = add_res;
      WR_COPY: wr_data = rd_data;
      WR_DIN:  wr_data = data_in;
      default: wr_data = data_in;
    endcase
  end

  reg_file #(.WORD_LENGTH(WORD_LENGTH), .NREGS(NREGS)) u_rf (
    .clk, .reset,
    .rd_addr(ctrl.rd_addr), .rd_data,
    .we, .wr_addr(ctrl.wr_addr), .wr_data
  );

  add_unit #(.WORD_LENGTH(WORD_LENGTH)) u_add (
    .clk, .reset,
    .add_l_sel(ctrl.add_l_sel), .add_l_en(ctrl.add_l_en),
    .add_r_sel(ctrl.add_r_sel), .add_r_en(ctrl.add_r_en),
    .sub(ctrl.sub), .rf_data(rd_data), .result(add_res)
  );

  cmp_unit #(.WORD_LENGTH(WORD_LENGTH)) u_cmp (
    .clk, .reset,
    .cmp_l_sel(ctrl.cmp_l_sel), .cmp_l_en(ctrl.cmp_l_en),
    .cmp_r_sel(ctrl.cmp_r_sel), .cmp_r_en(ctrl.cmp_r_en),
    .rf_data(rd_data), .add_data(add_res),
    .equal, .greater
  );

  assign data_out = rd_data;

endmodule
