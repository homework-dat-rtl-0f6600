// gcd_pkg: types shared by the control unit and the datapath of the
// subtraction-based GCD engine.
//
// state_e lists the ten states of the mygcd control unit in the order the
// design defines them. wr_sel_e is the two-bit write-select/enable code of the
// register file: 00 writes nothing, 01 writes the subtractor result, 10 copies
// the word on the read port, 11 writes the input word. The three codes that
// write are the ones the control unit issues; which source each non-zero code
// picks is this design's reading of the states that use it. dp_ctrl_t bundles
// every control line from the control unit to the datapath.
package gcd_pkg;

  localparam int unsigned NREGS     = 4;  // register file words
  localparam int unsigned ADDR_BITS = 2;

  typedef enum logic [3:0] {
    ST_START       = 4'd0,
    ST_READ1       = 4'd1,
    ST_READ2       = 4'd2,
    ST_INIT_COMP   = 4'd3,
    ST_LOAD_ADD_L0 = 4'd4,
    ST_LOAD_ADD_L1 = 4'd5,
    ST_LOAD_ADD_R0 = 4'd6,
    ST_LOAD_ADD_R1 = 4'd7,
    ST_SUB_COMP    = 4'd8,
    ST_FINISHED    = 4'd9
  } state_e;

  typedef enum logic [1:0] {
    WR_NONE = 2'b00,  // no write
    WR_SUB  = 2'b01,  // write the adder/subtractor result
    WR_COPY = 2'b10,  // write the word on the read port (register copy)
    WR_DIN  = 2'b11   // write data_in
  } wr_sel_e;

  // Operand-register source: the register-file read port or the adder result.
  typedef enum logic {
    SRC_RF  = 1'b0,
    SRC_ADD = 1'b1
  } src_e;

  typedef struct packed {
    src_e                 add_l_sel;
    logic                 add_l_en;
    src_e                 add_r_sel;
    logic                 add_r_en;
    logic                 sub;        // 1: add_l - add_r, 0: add_l + add_r
    src_e                 cmp_l_sel;
    logic                 cmp_l_en;
    src_e                 cmp_r_sel;
    logic                 cmp_r_en;
    logic [ADDR_BITS-1:0] rd_addr;
    logic [ADDR_BITS-1:0] wr_addr;
    wr_sel_e              wr_sel_en;
  } dp_ctrl_t;

endpackage
