// mac_unit: one residue channel of the dual-field residue Montgomery
// multiplier.
//
// The unit owns one modulus of each residue base: p_i = 2^r - mu_a (base A)
// and q_i = 2^r - mu_b (base B), or the polynomials x^r + mu(x) in GF(2^n)
// mode.  It holds RAM1 (base-A words), RAM2 (base-B words), a constant store
// per base (ROM1/ROM2, filled once through the configuration port), one
// dual-field multiplier (dm + df_cla), one modular reduction unit (dmr) and one
// adder/subtractor (dmas).  A (2r+LW)-bit column accumulator (R2) serves
// residue-to-binary conversion: its bits above r go to the next unit in the
// chain (MAC(i+1)) and chain_in comes from MAC(i-1).
//
// Micro-operations (rns_pkg::mac_op_t) run in a two-stage pipeline:
//   stage 1: select x (RAM / bus / 0) and y (ROM / RAM / 1), multiply,
//            reduce modulo the op's modulus, register in R1 (for M_RACC the
//            unreduced 2r-bit product is registered instead);
//   stage 2: read the accumulator word and combine it with R1 in the dmas
//            (M_MUL: pass, M_MAC: modular add, M_MSC: modular subtract),
//            then write RAM; or update the column accumulator with the dmas
//            in its normal (2r+LW-bit) mode: M_RACC adds R1, M_RPROP replaces
//            it by its low r bits plus the upper bits of MAC(i-1), M_RCLR
//            clears it.
// An op issued in cycle t writes at the end of cycle t+1, so its result can
// be read as a stage-1 operand by an op issued in cycle t+2; an accumulator
// is read in stage 2 and can be updated by back-to-back ops.  op_en gates the
// write of this unit (per-unit predication of the broadcast op).
// rd_data is an asynchronous read of either RAM for the shared bus.
// Organisation (RAMs, ROM, DM -> DMR -> R1, DMAS -> R2, neighbour chain)
// follows the MAC unit of the architecture; the micro-op format, the 8-word
// RAM depth, the loadable constant store and the 2-stage timing are this
// design's choices.
module mac_unit
  import rns_pkg::*;
#(
  parameter int unsigned R  = R_DEF,
  parameter int unsigned H  = H_DEF,
  parameter int unsigned L  = L_DEF,
  parameter int unsigned LW = (L > 1) ? $clog2(L) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fsel,       // 1: GF(p) / RNS, 0: GF(2^n) / PRNS
  // configuration: constant store and mu registers
  input  logic              cfg_we,
  input  base_e             cfg_base,
  input  logic [ROM_AW-1:0] cfg_addr,   // rom_mu(L) writes mu
  input  logic [R-1:0]      cfg_data,
  // broadcast micro-operation
  input  mac_op_t           op,
  input  logic              op_en,
  input  logic [R-1:0]      bus_in,
  // neighbour chain (residue-to-binary carries)
  input  logic [R+LW-1:0]   chain_in,
  output logic [R+LW-1:0]   chain_out,
  // read port for the bus and results
  input  base_e             rd_base,
  input  logic [RAM_AW-1:0] rd_addr,
  output logic [R-1:0]      rd_data,
  output logic [R-1:0]      limb
);
  localparam int unsigned ROMN = 4*L + 3;
  localparam int unsigned DW   = 2*R + LW;

  // ---------------------------------------------------------------- storage
  logic [R-1:0] ram1 [1 << RAM_AW];
  logic [R-1:0] ram2 [1 << RAM_AW];
  logic [R-1:0] rom1 [ROMN];
  logic [R-1:0] rom2 [ROMN];
  logic [H-1:0] mu_a, mu_b;
  logic [2*R+LW-1:0] cacc;                 // column accumulator (R2)

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      if (cfg_addr == ROM_AW'(rom_mu(L))) begin
        if (cfg_base == BASE_A) mu_a <= cfg_data[H-1:0];
        else                    mu_b <= cfg_data[H-1:0];
      end else if (32'(cfg_addr) < ROMN) begin
        if (cfg_base == BASE_A) rom1[cfg_addr] <= cfg_data;
        else                    rom2[cfg_addr] <= cfg_data;
      end
    end
  end

  assign rd_data = (rd_base == BASE_A) ? ram1[rd_addr] : ram2[rd_addr];

  // ---------------------------------------------------------------- stage 1
  logic [R-1:0]   xv, yv;
  logic [H-1:0]   mu1;
  logic [2*R-1:0] pps, ppc, prod;
  logic           prod_co;
  logic [R-1:0]   red;

  always_comb begin
    unique case (op.xsrc)
      XS_BUS:  xv = bus_in;
      XS_ZERO: xv = '0;
      default: xv = (op.base == BASE_A) ? ram1[op.xaddr] : ram2[op.xaddr];
    endcase
    unique case (op.ysrc)
      YS_RAM:  yv = (op.base == BASE_A) ? ram1[op.yaddr[RAM_AW-1:0]] : ram2[op.yaddr[RAM_AW-1:0]];
      YS_ONE:  yv = R'(1);
      default: yv = (32'(op.yaddr) < ROMN)
                    ? ((op.base == BASE_A) ? rom1[op.yaddr] : rom2[op.yaddr]) : '0;
    endcase
    mu1 = (op.base == BASE_A) ? mu_a : mu_b;
  end

  dm #(.WA(R), .WB(R)) u_dm (.a(xv), .b(yv), .fsel(fsel), .ps(pps), .pc(ppc));
  df_cla #(.W(2*R)) u_dm_cla (.x(pps), .y(ppc), .cin(1'b0), .fsel(fsel), .s(prod),
                              .cout(prod_co));
  dmr #(.R(R), .H(H)) u_dmr (.c(prod), .mu(mu1), .fsel(fsel), .z(red));

  // R1 and the op travelling with it
  logic [2*R-1:0] r1;
  mode_e          mode2;
  base_e          base2;
  logic [RAM_AW-1:0] acc2, dst2;
  logic           en2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1    <= '0;
      mode2 <= M_NOP;
      base2 <= BASE_A;
      acc2  <= '0;
      dst2  <= '0;
      en2   <= 1'b0;
    end else begin
      r1    <= (op.mode == M_RACC) ? prod : {{R{1'b0}}, red};
      mode2 <= op.mode;
      base2 <= op.base;
      acc2  <= op.accaddr;
      dst2  <= op.daddr;
      en2   <= op_en;
    end
  end

  // ---------------------------------------------------------------- stage 2
  logic [R-1:0]  accv, modv;
  logic [H-1:0]  mu2;
  logic [DW-1:0] ax, ay, az;
  logic          add_sub, conv_mode;

  always_comb begin
    accv = (base2 == BASE_A) ? ram1[acc2] : ram2[acc2];
    mu2  = (base2 == BASE_A) ? mu_a : mu_b;
    modv = R'(0) - R'(mu2);               // 2^r - mu
    add_sub   = (mode2 == M_MSC);
    conv_mode = (mode2 != M_RACC) && (mode2 != M_RPROP);
    if (mode2 == M_RACC) begin
      ax = cacc;
      ay = DW'(r1);
    end else if (mode2 == M_RPROP) begin
      ax = DW'(cacc[R-1:0]);
      ay = DW'(chain_in);
    end else begin
      ax = DW'(accv);
      ay = DW'(r1[R-1:0]);
    end
  end

  dmas #(.R(R), .LW(LW)) u_dmas (.x(ax), .y(ay), .m(modv), .add_sub(add_sub),
                                 .conv_mode(conv_mode), .fsel(fsel), .z(az));

  logic [R-1:0] wdata;
  assign wdata = (mode2 == M_MUL) ? r1[R-1:0] : az[R-1:0];

  always_ff @(posedge clk) begin
    if (en2 && (mode2 == M_MUL || mode2 == M_MAC || mode2 == M_MSC)) begin
      if (base2 == BASE_A) ram1[dst2] <= wdata;
      else                 ram2[dst2] <= wdata;
    end
  end

  // column accumulator (R2)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                            cacc <= '0;
    else if (en2 && mode2 == M_RCLR)                       cacc <= '0;
    else if (en2 && (mode2 == M_RACC || mode2 == M_RPROP)) cacc <= az;
  end

  assign chain_out = cacc[DW-1:R];
  assign limb      = cacc[R-1:0];
endmodule
