// tb_dramm_top: end-to-end test of the dual-field residue Montgomery
// multiplier with L = 4 units (128-bit residue range).  In both GF(p) and
// GF(2^n): random Montgomery multiplications with binary input and output,
// exponentiations with 32-bit exponents and a full Fermat inversion, all
// checked against wide reference arithmetic (see tb_dramm_body.svh).
// The operations tested (Montgomery multiplication, exponentiation,
// inversion in both fields) follow the architecture; sizes and counts are
// this testbench's own.
module tb_dramm_top;
  localparam int unsigned L = 4;
  localparam bit DO_POLY = 1;
  localparam int N_MUL = 6;
  localparam int N_EXP = 2;
  localparam int N_INV = 1;
`define WATCHDOG 400000
`define DUT_INST \
  dramm_top #(.L(L)) dut ( \
    .clk, .rst_n, .fsel, .cfg_we, .cfg_unit, .cfg_base, .cfg_addr, .cfg_data, \
    .start, .cmd_exp, .exp_e, .a_in, .b_in, .busy, .done, .c_bin, \
    .res_base, .res_addr, .res_data, .n_rmm, .n_sqr, .n_mul);
`include "tb_dramm_body.svh"
endmodule
