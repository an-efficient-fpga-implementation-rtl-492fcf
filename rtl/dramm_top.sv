// dramm_top: dual-field residue arithmetic Montgomery multiplier (DRAMM).
//
// L MAC units, one per pair of residue moduli (p_i of base A, q_i of base B),
// share a broadcast bus and are chained MAC(i) -> MAC(i+1) for the carries of
// residue-to-binary conversion.  A sequencer (dramm_ctrl) drives every unit
// with the same micro-operation and a per-unit write mask.  The same hardware
// computes, selected by fsel, in GF(p) with integer residues (RNS, moduli
// 2^r - mu) or in GF(2^n) with polynomial residues (PRNS, moduli x^r + mu(x)).
//
// Use:
//  1. After reset, load every unit's constants through cfg_* (cfg_unit picks
//     the unit, cfg_base the base, cfg_addr the rns_pkg ROM layout entry,
//     rom_mu(L) the unit's mu).  The constants depend on the moduli and on the
//     field modulus p and are computed off-line.
//  2. Put a and b on a_in / b_in as L little-endian r-bit digits (integers, or
//     polynomial coefficients, bit j of digit i = coefficient of x^(r*i+j)),
//     set fsel, cmd_exp and exp_e, and pulse start.  Hold the inputs until
//     done.
//  3. done pulses for one cycle; c_bin then holds the result as L r-bit
//     digits: a*b*Q^-1 mod p (CMD_MULT) or a^e mod p (CMD_EXP with
//     b = Q^2 mod p), where Q is the product of the base-B moduli.  Integer
//     results are < 2p (not fully reduced), polynomial results have degree < n.
//  res_base / res_addr read a RAM word of every unit while idle (res_data),
//  e.g. RA_C for the residues of c.
// Latency (CMD_MULT): 14L + 19 cycles from the start pulse to done.
// Operand limits: integers a, b < 2p with 4p <= Q and 2p <= P; polynomials of
// degree < n with deg P > n and deg Q > n.
// The unit array, the bus, the neighbour chain and the phases follow the
// architecture; the sequencer schedule, the loadable constants and the port
// set are this design's choices (see dramm_ctrl).
module dramm_top
  import rns_pkg::*;
#(
  parameter int unsigned R  = R_DEF,
  parameter int unsigned H  = H_DEF,
  parameter int unsigned L  = L_DEF,
  parameter int unsigned EW = R * L
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  fsel,        // 1: GF(p), 0: GF(2^n)
  // constant loading
  input  logic                  cfg_we,
  input  logic [$clog2(L)-1:0]  cfg_unit,
  input  base_e                 cfg_base,
  input  logic [ROM_AW-1:0]     cfg_addr,
  input  logic [R-1:0]          cfg_data,
  // command
  input  logic                  start,
  input  logic                  cmd_exp,
  input  logic [EW-1:0]         exp_e,
  input  logic [R-1:0]          a_in [L],
  input  logic [R-1:0]          b_in [L],
  output logic                  busy,
  output logic                  done,
  output logic [R-1:0]          c_bin [L],
  // residue read-back
  input  base_e                 res_base,
  input  logic [RAM_AW-1:0]     res_addr,
  output logic [R-1:0]          res_data [L],
  // activity counters: RMMs, squarings, multiplications by the base
  output logic [31:0]           n_rmm,
  output logic [31:0]           n_sqr,
  output logic [31:0]           n_mul
);
  localparam int unsigned KW = $clog2(L+1);
  localparam int unsigned LW = (L > 1) ? $clog2(L) : 1;

  mac_op_t           op;
  logic [L-1:0]      op_en;
  logic [1:0]        bus_src;
  logic [KW-1:0]     bus_idx;
  base_e             c_rd_base;
  logic [RAM_AW-1:0] c_rd_addr;
  base_e             rd_base;
  logic [RAM_AW-1:0] rd_addr;

  dramm_ctrl #(.L(L), .EW(EW)) u_ctrl (
    .clk, .rst_n, .start, .cmd_exp, .exp_e,
    .op, .op_en, .bus_src, .bus_idx, .rd_base(c_rd_base), .rd_addr(c_rd_addr),
    .busy, .done, .n_rmm, .n_sqr, .n_mul
  );

  assign rd_base = busy ? c_rd_base : res_base;
  assign rd_addr = busy ? c_rd_addr : res_addr;

  logic [R-1:0] rd_data [L];
  logic [R+LW-1:0] chain [L+1];
  logic [R-1:0]    bus;

  // shared bus
  always_comb begin
    unique case (bus_src)
      2'd1:    bus = (32'(bus_idx) < L) ? a_in[bus_idx]    : '0;
      2'd2:    bus = (32'(bus_idx) < L) ? b_in[bus_idx]    : '0;
      2'd3:    bus = (32'(bus_idx) < L) ? rd_data[bus_idx] : '0;
      default: bus = '0;
    endcase
  end

  // nothing enters the carry chain below the first unit; the carry out of
  // the last unit is zero for every valid result (c < 2p <= P < 2^(rL))
  assign chain[0] = '0;

  for (genvar i = 0; i < L; i++) begin : g_mac
    mac_unit #(.R(R), .H(H), .L(L), .LW(LW)) u_mac (
      .clk, .rst_n, .fsel,
      .cfg_we(cfg_we && 32'(cfg_unit) == i), .cfg_base, .cfg_addr, .cfg_data,
      .op, .op_en(op_en[i]), .bus_in(bus),
      .chain_in(chain[i]), .chain_out(chain[i+1]),
      .rd_base, .rd_addr, .rd_data(rd_data[i]), .limb(c_bin[i])
    );
  end

  assign res_data = rd_data;
endmodule
