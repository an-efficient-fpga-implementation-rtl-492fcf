// rns_pkg: shared constants and micro-operation types of the dual-field
// residue Montgomery multiplier (DRAMM).
//
// Every MAC unit of the array executes the same micro-operation each cycle
// (single instruction, one per-unit write enable).  A micro-operation names
// the residue base it works in (base A, moduli p_i, kept in RAM1/ROM1, or
// base B, moduli q_i, kept in RAM2/ROM2), the two multiplier operands, what
// the modular adder/subtractor does with the reduced product, and where the
// result goes.  The layout of the constant store (ROM) and of the data RAMs
// is fixed here so that the sequencer and the testbenches agree on it.
// The widths h = 10 and L = 66 follow the architecture; r = 32, the RAM
// and constant-store layout and the micro-operation encoding are this design's.
package rns_pkg;

  // Default residue word length r, width h of mu_i (modulus = 2^r - mu_i,
  // or x^r + mu_i(x)), and number of moduli per base L.
  localparam int unsigned R_DEF = 32;
  localparam int unsigned H_DEF = 10;
  localparam int unsigned L_DEF = 66;

  // Data RAM (RAM1 for base A, RAM2 for base B): 8 words per unit.
  localparam int unsigned RAM_AW = 3;
  localparam logic [RAM_AW-1:0] RA_A = 3'd0;  // operand a
  localparam logic [RAM_AW-1:0] RA_B = 3'd1;  // operand b
  localparam logic [RAM_AW-1:0] RA_S = 3'd2;  // s = a*b
  localparam logic [RAM_AW-1:0] RA_T = 3'd3;  // t (and MRC accumulator of t)
  localparam logic [RAM_AW-1:0] RA_V = 3'd4;  // v = s + t*p
  localparam logic [RAM_AW-1:0] RA_C = 3'd5;  // result c
  localparam logic [RAM_AW-1:0] RA_W = 3'd6;  // MRC accumulator of c
  localparam logic [RAM_AW-1:0] RA_U = 3'd7;  // mixed-radix digit held by this unit

  // Constant store (ROM1 / ROM2), one per base, per unit.  With L moduli:
  //   [0      , L)    <2^(r*k)>_m  or <x^(r*k)>_m      binary-to-residue radix
  //   [L      , 2L)   <prod_{j<k} own-base moduli>_m    MRC update weights
  //   [2L     , 3L)   <prod_{j<k} other-base moduli>_m  base-extension weights
  //   [3L     , 4L)   limb i (this unit's index) of the   residue-to-binary
  //                   mixed-radix weight W_k = prod_{j<k} own-base moduli   weights
  //   4L              V_i = <(prod_{j<i} own moduli)^-1>_m
  //   4L+1            base A: <p>_m          base B: <-p^-1>_m (GF(p)) / <p^-1>_m (GF(2^n))
  //   4L+2            base A: <Q^-1>_m       base B: unused
  //   4L+3            (configuration port only) mu of this unit's modulus
  localparam int unsigned ROM_AW = 9;
  function automatic int unsigned rom_radix(int unsigned k); return k;         endfunction
  function automatic int unsigned rom_wown (int unsigned l, int unsigned k); return l + k;     endfunction
  function automatic int unsigned rom_woth (int unsigned l, int unsigned k); return 2*l + k;   endfunction
  function automatic int unsigned rom_wlimb(int unsigned l, int unsigned k); return 3*l + k;   endfunction
  function automatic int unsigned rom_v    (int unsigned l);                 return 4*l;       endfunction
  function automatic int unsigned rom_k1   (int unsigned l);                 return 4*l + 1;   endfunction
  function automatic int unsigned rom_k2   (int unsigned l);                 return 4*l + 2;   endfunction
  function automatic int unsigned rom_mu   (int unsigned l);                 return 4*l + 3;   endfunction

  typedef enum logic {BASE_A = 1'b0, BASE_B = 1'b1} base_e;

  // First multiplier operand.
  typedef enum logic [1:0] {
    XS_RAM  = 2'd0,   // RAM of the op's base at xaddr
    XS_BUS  = 2'd1,   // value broadcast on the bus
    XS_ZERO = 2'd2    // constant 0
  } xsrc_e;

  // Second multiplier operand.
  typedef enum logic [1:0] {
    YS_ROM = 2'd0,    // constant store of the op's base at yaddr
    YS_RAM = 2'd1,    // RAM of the op's base at yaddr
    YS_ONE = 2'd2     // constant 1
  } ysrc_e;

  // What stage 2 (DMAS) does with the stage-1 product.
  typedef enum logic [2:0] {
    M_NOP    = 3'd0,
    M_MUL    = 3'd1,  // ram[d] = <x*y>_m
    M_MAC    = 3'd2,  // ram[d] = <ram[acc] + <x*y>_m>_m
    M_MSC    = 3'd3,  // ram[d] = <ram[acc] - <x*y>_m>_m
    M_RACC   = 3'd4,  // column accumulator += x*y (plain 2r+LW-bit sum)
    M_RPROP  = 3'd5,  // column accumulator = its low r bits + chain_in
    M_RCLR   = 3'd6   // column accumulator = 0
  } mode_e;

  typedef struct packed {
    mode_e               mode;
    base_e               base;
    xsrc_e               xsrc;
    logic [RAM_AW-1:0]   xaddr;
    ysrc_e               ysrc;
    logic [ROM_AW-1:0]   yaddr;
    logic [RAM_AW-1:0]   accaddr;
    logic [RAM_AW-1:0]   daddr;
  } mac_op_t;

  localparam mac_op_t OP_NOP = '{mode: M_NOP, base: BASE_A, xsrc: XS_RAM, xaddr: '0,
                                 ysrc: YS_ONE, yaddr: '0, accaddr: '0, daddr: '0};

endpackage
