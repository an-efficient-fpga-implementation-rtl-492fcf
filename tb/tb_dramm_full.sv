// tb_dramm_full: the dual-field residue Montgomery multiplier at its default
// size (L = 66 units of r = 32 bits, a 2112-bit residue range, enough for
// 2048-bit GF(p) moduli; the test uses a 2040-bit p because its wide reference
// arithmetic stops at 4096-bit products).  Loads the constants for 132
// integer moduli, runs one complete Montgomery multiplication with binary
// input and output and one exponentiation with a 32-bit exponent, checked against wide reference
// arithmetic (see tb_dramm_body.svh).  GF(2^n) is not run at this size: a greedy search
// finds only 91 pairwise coprime polynomials x^32 + mu(x) with mu < 2^10, fewer
// than the 132 moduli needed; tb_dramm_top covers GF(2^n) at L = 4.
// The default size (L = 66, h = 10) follows the architecture; r = 32 and
// the choice of p and moduli are this testbench's own.
module tb_dramm_full;
  localparam int unsigned L = 66;
  localparam bit DO_POLY = 0;
  localparam int N_MUL = 1;
  localparam int N_EXP = 1;
  localparam int N_INV = 0;
`define WATCHDOG 400000
`define DUT_INST \
  dramm_top dut ( \
    .clk, .rst_n, .fsel, .cfg_we, .cfg_unit, .cfg_base, .cfg_addr, .cfg_data, \
    .start, .cmd_exp, .exp_e, .a_in, .b_in, .busy, .done, .c_bin, \
    .res_base, .res_addr, .res_data, .n_rmm, .n_sqr, .n_mul);
`include "tb_dramm_body.svh"
endmodule
