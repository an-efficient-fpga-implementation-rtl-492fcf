// dramm_ctrl: sequencer of the dual-field residue Montgomery multiplier.
//
// Issues one broadcast micro-operation per cycle to the L MAC units, together
// with a per-unit write-enable mask and the bus source.  Commands:
//   CMD_MULT: binary-to-residue conversion of a and b (both bases), one
//             residue Montgomery multiplication c = a*b*Q^-1 mod p, and
//             residue-to-binary conversion of c.
//   CMD_EXP:  conversion of a and b, x~ = RMM(a, b) (b = Q^2 mod p brings a
//             into the Montgomery domain), x~ copied to the operand word,
//             left-to-right square-and-multiply over the exponent bits below
//             the leading one, RMM(c, 1) to leave the Montgomery domain, and
//             residue-to-binary conversion.  Requires exp >= 1.
// One residue Montgomery multiplication (RMM) runs
//   s = x*y (both bases); t_B = s_B * <-p^-1>; base conversion B->A of t by
//   mixed-radix conversion (4 cycles per digit: digit U_k = acc_k * V_k in
//   unit k, bus broadcast, acc_j -= U_k*W_k in units j > k of base B and
//   t_A += U_k*W'_k in all units of base A); v = s + t*p; c = v * Q^-1 (base
//   A); base conversion A->B of c in the same way.  The mixed-radix digits of
//   c in base A stay in every unit's RA_U word and feed the residue-to-binary
//   conversion z = sum_k U_k * W_k, W_k = p_0 ... p_(k-1): in cycle k the
//   digit U_k is broadcast and unit i adds U_k times limb i of W_k to its
//   (2r+LW)-bit column sum; L+2 carry-propagation passes along the chain
//   then leave limb i of z in unit i.
// Timing: binary-to-residue 4L, RMM 8L+13, residue-to-binary 2L+3 cycles.
// Ops are spaced so that no stage-1 operand is read before the write of the
// op that produces it (see mac_unit).
// The phase order follows the residue Montgomery algorithm and the
// column-sum form of the output conversion follows the matrix formulation of
// mixed-radix-to-binary conversion; the exact schedule (digits are not
// overlapped between units) and the exponentiation loop are this design's
// choices.
module dramm_ctrl
  import rns_pkg::*;
#(
  parameter int unsigned L  = L_DEF,
  parameter int unsigned EW = R_DEF * L_DEF   // exponent width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 cmd_exp,    // 0: CMD_MULT, 1: CMD_EXP
  input  logic [EW-1:0]        exp_e,
  output mac_op_t              op,
  output logic [L-1:0]         op_en,
  output logic [1:0]           bus_src,    // 0 zero, 1 digit of a, 2 digit of b, 3 unit
  output logic [$clog2(L+1)-1:0] bus_idx,  // digit index / unit index
  output base_e                rd_base,
  output logic [RAM_AW-1:0]    rd_addr,
  output logic                 busy,
  output logic                 done,
  // event counters (mechanism coverage)
  output logic [31:0]          n_rmm,
  output logic [31:0]          n_sqr,
  output logic [31:0]          n_mul
);
  localparam int unsigned KW = $clog2(L+1);

  typedef enum logic [3:0] {
    S_IDLE, S_B2R, S_RMM_S, S_BC1, S_CV, S_BC2, S_NEXT, S_COPY,
    S_R2B_CLR, S_RACC, S_RPROP, S_DONE
  } state_e;

  typedef enum logic [1:0] {EX_TOMONT, EX_SQR, EX_MUL, EX_FROMMONT} exstep_e;

  state_e        st;
  exstep_e       ex;
  logic          mode_exp;
  logic [KW-1:0] k;
  logic [2:0]    sub;
  logic [$clog2(EW+1)-1:0] bit_idx;
  logic [EW-1:0] e_q;

  // position of the leading one of the exponent
  function automatic int unsigned msb(input logic [EW-1:0] v);
    int unsigned r = 0;
    for (int unsigned i = 0; i < EW; i++) if (v[i]) r = i;
    return r;
  endfunction

  // RMM operand selection for the current exponentiation step
  logic [RAM_AW-1:0] sx_addr;
  ysrc_e             sy_src;
  logic [RAM_AW-1:0] sy_addr;
  always_comb begin
    sx_addr = RA_A; sy_src = YS_RAM; sy_addr = RA_B;
    if (mode_exp) begin
      unique case (ex)
        EX_SQR:      begin sx_addr = RA_C; sy_addr = RA_C; end
        EX_MUL:      begin sx_addr = RA_C; sy_addr = RA_A; end
        EX_FROMMONT: begin sx_addr = RA_C; sy_src = YS_ONE; end
        default: ;
      endcase
    end
  end

  function automatic mac_op_t mk(mode_e m, base_e b, xsrc_e xs, logic [RAM_AW-1:0] xa,
                                 ysrc_e ys, int unsigned ya, logic [RAM_AW-1:0] acc,
                                 logic [RAM_AW-1:0] d);
    mac_op_t o;
    o.mode = m; o.base = b; o.xsrc = xs; o.xaddr = xa; o.ysrc = ys;
    o.yaddr = ROM_AW'(ya); o.accaddr = acc; o.daddr = d;
    return o;
  endfunction

  function automatic logic [L-1:0] above(input logic [KW-1:0] kk);  // units j > kk
    logic [L-1:0] m = '0;
    for (int unsigned j = 0; j < L; j++) m[j] = (j > 32'(kk));
    return m;
  endfunction

  function automatic logic [L-1:0] onehot(input logic [KW-1:0] kk);
    logic [L-1:0] m = '0;
    for (int unsigned j = 0; j < L; j++) m[j] = (j == 32'(kk));
    return m;
  endfunction

  // ------------------------------------------------ micro-op generation
  always_comb begin
    op      = OP_NOP;
    op_en   = '0;
    bus_src = 2'd0;
    bus_idx = k;
    rd_base = BASE_A;
    rd_addr = RA_U;
    unique case (st)
      S_B2R: begin                       // sub[1]: operand, sub[0]: base
        bus_src = sub[1] ? 2'd2 : 2'd1;
        op_en   = '1;
        op = mk((k == 0) ? M_MUL : M_MAC, base_e'(sub[0]), XS_BUS, RA_A, YS_ROM,
                rom_radix(32'(k)), sub[1] ? RA_B : RA_A, sub[1] ? RA_B : RA_A);
      end
      S_RMM_S: begin
        op_en = '1;
        unique case (sub)
          3'd1: op = mk(M_MUL, BASE_A, XS_RAM, sx_addr, sy_src, 32'(sy_addr), RA_S, RA_S);
          3'd2: op = mk(M_MUL, BASE_B, XS_RAM, sx_addr, sy_src, 32'(sy_addr), RA_S, RA_S);
          3'd4: op = mk(M_MUL, BASE_B, XS_RAM, RA_S, YS_ROM, rom_k1(L), RA_T, RA_T);
          default: ;
        endcase
      end
      S_BC1, S_BC2: begin               // MRC in base "own", extension into "oth"
        automatic base_e own = (st == S_BC1) ? BASE_B : BASE_A;
        automatic base_e oth = (st == S_BC1) ? BASE_A : BASE_B;
        automatic logic [RAM_AW-1:0] acc = (st == S_BC1) ? RA_T : RA_W;
        automatic logic [RAM_AW-1:0] dst = (st == S_BC1) ? RA_T : RA_C;
        bus_src = 2'd3;
        rd_base = own;
        rd_addr = RA_U;
        unique case (sub)
          3'd0: begin
            op_en = onehot(k);
            op = mk(M_MUL, own, XS_RAM, acc, YS_ROM, rom_v(L), RA_U, RA_U);
          end
          3'd2: begin
            op_en = above(k);
            op = mk(M_MSC, own, XS_BUS, RA_U, YS_ROM, rom_wown(L, 32'(k)), acc, acc);
          end
          3'd3: begin
            op_en = '1;
            op = mk((k == 0) ? M_MUL : M_MAC, oth, XS_BUS, RA_U, YS_ROM, rom_woth(L, 32'(k)),
                    dst, dst);
          end
          default: ;
        endcase
      end
      S_CV: begin
        op_en = '1;
        unique case (sub)
          3'd1: op = mk(M_MAC, BASE_A, XS_RAM, RA_T, YS_ROM, rom_k1(L), RA_S, RA_V);
          3'd3: op = mk(M_MUL, BASE_A, XS_RAM, RA_V, YS_ROM, rom_k2(L), RA_C, RA_C);
          3'd4: op = mk(M_MUL, BASE_A, XS_RAM, RA_V, YS_ROM, rom_k2(L), RA_W, RA_W);
          default: ;
        endcase
      end
      S_COPY: begin
        op_en = '1;
        unique case (sub)
          3'd1: op = mk(M_MUL, BASE_A, XS_RAM, RA_C, YS_ONE, 0, RA_A, RA_A);
          3'd2: op = mk(M_MUL, BASE_B, XS_RAM, RA_C, YS_ONE, 0, RA_A, RA_A);
          default: ;
        endcase
      end
      S_R2B_CLR: begin
        op_en = '1;
        op = mk(M_RCLR, BASE_A, XS_ZERO, RA_U, YS_ONE, 0, RA_U, RA_U);
      end
      S_RACC: begin                      // column sums of U_k * W_k
        op_en   = '1;
        bus_src = 2'd3;
        rd_base = BASE_A;
        rd_addr = RA_U;
        op = mk(M_RACC, BASE_A, XS_BUS, RA_U, YS_ROM, rom_wlimb(L, 32'(k)), RA_U, RA_U);
      end
      S_RPROP: begin                     // carry propagation along the chain
        op_en = '1;
        op = mk(M_RPROP, BASE_A, XS_ZERO, RA_U, YS_ONE, 0, RA_U, RA_U);
      end
      default: ;
    endcase
  end

  // ------------------------------------------------ sequencing
  logic [KW-1:0] LAST;
  assign LAST = KW'(L - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ex <= EX_TOMONT; mode_exp <= 1'b0;
      k <= '0; sub <= '0; bit_idx <= '0; e_q <= '0;
      done <= 1'b0; n_rmm <= '0; n_sqr <= '0; n_mul <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_B2R; k <= '0; sub <= '0;
          mode_exp <= cmd_exp; ex <= EX_TOMONT; e_q <= exp_e;
        end
        S_B2R: begin
          sub <= (sub == 3'd3) ? 3'd0 : sub + 3'd1;
          if (sub == 3'd3) begin
            k <= k + 1'b1;
            if (k == LAST) begin st <= S_RMM_S; k <= '0; end
          end
        end
        S_RMM_S: begin
          sub <= sub + 3'd1;
          if (sub == 3'd5) begin
            st <= S_BC1; sub <= '0; k <= '0;
            n_rmm <= n_rmm + 1;
            if (mode_exp && ex == EX_SQR) n_sqr <= n_sqr + 1;
            if (mode_exp && ex == EX_MUL) n_mul <= n_mul + 1;
          end
        end
        S_BC1, S_BC2: begin
          sub <= (sub == 3'd3) ? 3'd0 : sub + 3'd1;
          if (sub == 3'd3) begin
            k <= k + 1'b1;
            if (k == LAST) begin
              k <= '0;
              st <= (st == S_BC1) ? S_CV : S_NEXT;
            end
          end
        end
        S_CV: begin
          sub <= sub + 3'd1;
          if (sub == 3'd5) begin st <= S_BC2; sub <= '0; k <= '0; end
        end
        S_NEXT: begin                    // one idle cycle lets the last write land
          sub <= '0;
          if (!mode_exp || ex == EX_FROMMONT) st <= S_R2B_CLR;
          else if (ex == EX_TOMONT) st <= S_COPY;
          else if (ex == EX_SQR && e_q[bit_idx]) begin ex <= EX_MUL; st <= S_RMM_S; end
          else if (bit_idx == 0) begin ex <= EX_FROMMONT; st <= S_RMM_S; end
          else begin bit_idx <= bit_idx - 1'b1; ex <= EX_SQR; st <= S_RMM_S; end
        end
        S_COPY: begin
          sub <= sub + 3'd1;
          if (sub == 3'd2) begin
            sub <= '0;
            st  <= S_RMM_S;
            if (msb(e_q) == 0) ex <= EX_FROMMONT;
            else begin ex <= EX_SQR; bit_idx <= $bits(bit_idx)'(msb(e_q) - 1); end
          end
        end
        S_R2B_CLR: begin
          st <= S_RACC; k <= '0;
        end
        S_RACC: begin
          k <= k + 1'b1;
          if (k == LAST) begin st <= S_RPROP; k <= '0; end
        end
        S_RPROP: begin                   // L+2 passes settle every carry
          k <= k + 1'b1;
          if (32'(k) == L + 1) begin st <= S_DONE; k <= '0; end
        end
        S_DONE: begin
          st <= S_IDLE;
          done <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
endmodule
