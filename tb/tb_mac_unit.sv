// tb_mac_unit: checks one MAC unit on its own (r = 32, h = 10, L = 4).
// Random micro-operations in both fields and both bases: modular multiply
// (operands from the bus, RAM, ROM or the constant 1), multiply-accumulate,
// multiply-subtract, with and without the unit's write enable; then the
// residue-to-binary column accumulator (clear, accumulate raw products,
// propagate with a chain input).  A reference model of the RAMs and the
// accumulator, using the testbench's own integer / polynomial arithmetic, is
// compared with the unit through its read port, limb and chain outputs.
// Also checks the two-cycle write latency: a result is not visible one cycle
// after issue and is visible after two.  Stimulus changes on the falling
// clock edge.  The operations tested are those of the MAC unit of the
// architecture; the micro-operation encoding and the RAM/constant layout are
// this design's own (rns_pkg).
module tb_mac_unit;
  import rns_pkg::*;
  import tb_rns_util::*;

  localparam int unsigned R = 32, H = 10, L = 4, LW = 2, DW = 2 * R + LW;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_sub_wrap = 0, n_disabled = 0;

  logic              rst_n, fsel, cfg_we, op_en;
  base_e             cfg_base, rd_base;
  logic [ROM_AW-1:0] cfg_addr;
  logic [R-1:0]      cfg_data, bus_in, rd_data, limb;
  logic [R+LW-1:0]   chain_in, chain_out;
  logic [RAM_AW-1:0] rd_addr;
  mac_op_t           op;

  mac_unit #(.R(R), .H(H), .L(L)) dut (
    .clk, .rst_n, .fsel, .cfg_we, .cfg_base, .cfg_addr, .cfg_data,
    .op, .op_en, .bus_in, .chain_in, .chain_out, .rd_base, .rd_addr, .rd_data, .limb);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned mdl [2][8];
  longint unsigned rom [2][4*L+3];
  longint unsigned md [2], mus [2];
  logic [DW-1:0]   cacc;

  function automatic longint unsigned addm(bit f, longint unsigned a, longint unsigned b,
                                           longint unsigned m, bit sub);
    if (!f) return a ^ b;
    return sub ? (a + m - b) % m : (a + b) % m;
  endfunction

  task automatic cfg(base_e b, int addr, longint unsigned d);
    cfg_we = 1'b1; cfg_base = b; cfg_addr = ROM_AW'(addr); cfg_data = R'(d);
    @(posedge clk);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic issue(mac_op_t o, logic en, logic [R-1:0] bus);
    op = o; op_en = en; bus_in = bus;
    @(posedge clk);
    @(negedge clk);
    op = OP_NOP; op_en = 1'b0;
  endtask

  task automatic check_rams();
    int w;
    w = 0;
    while (w < 16) begin
      rd_base = base_e'(w / 8);
      rd_addr = RAM_AW'(w % 8);
      #1;
      checks++;
      if (64'(rd_data) != mdl[w / 8][w % 8]) begin
        failures++;
        $display("FAIL ram base %0d word %0d: %h, expected %h", w / 8, w % 8, rd_data,
                 mdl[w / 8][w % 8]);
      end
      w++;
    end
  endtask

  initial begin
    int it, fi, b;
    bit f;
    logic [R-1:0] v, bv;
    logic en;
    mac_op_t o;
    longint unsigned xv, yv, pr, res;
    rst_n = 1'b0; fsel = 1'b1; cfg_we = 1'b0; op = OP_NOP; op_en = 1'b0; bus_in = '0;
    chain_in = '0; rd_base = BASE_A; rd_addr = '0; cfg_base = BASE_A; cfg_addr = '0;
    cfg_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fi = 0;
    while (fi < 2) begin
      f = fi[0];
      fsel = f;
      // moduli and constant store
      for (b = 0; b < 2; b++) begin
        mus[b] = 64'(1 + ($urandom % 1023));
        if (!f) mus[b] |= 1;
        md[b]  = f ? 64'h1_0000_0000 - mus[b] : 64'h1_0000_0000 | mus[b];
      end
      it = 0;
      while (it < 2 * (4 * L + 3)) begin
        rom[it % 2][it / 2] = f ? 64'($urandom) % md[it % 2] : 64'($urandom);
        cfg(base_e'(it % 2), it / 2, rom[it % 2][it / 2]);
        it++;
      end
      cfg(BASE_A, rom_mu(L), mus[0]);
      cfg(BASE_B, rom_mu(L), mus[1]);
      // initialise every RAM word with a known residue
      it = 0;
      while (it < 16) begin
        v = $urandom;
        issue('{mode: M_MUL, base: base_e'(it / 8), xsrc: XS_BUS, xaddr: '0, ysrc: YS_ONE,
                yaddr: '0, accaddr: '0, daddr: RAM_AW'(it % 8)}, 1'b1, v);
        mdl[it / 8][it % 8] = f ? 64'(v) % md[it / 8] : pmod(64'(v), md[it / 8]);
        it++;
      end
      @(negedge clk);
      check_rams();
      // random modular micro-operations
      it = 0;
      while (it < 300) begin
        b = $urandom % 2;
        o.base = base_e'(b);
        o.mode = mode_e'(1 + $urandom % 3);
        o.xsrc = ($urandom % 2) ? XS_BUS : XS_RAM;
        o.xaddr = RAM_AW'($urandom);
        o.ysrc = ysrc_e'($urandom % 3);
        o.yaddr = (o.ysrc == YS_ROM) ? ROM_AW'($urandom % (4 * L + 3)) : ROM_AW'($urandom % 8);
        o.accaddr = RAM_AW'($urandom);
        o.daddr = RAM_AW'($urandom);
        bv = $urandom;
        en = ($urandom % 8) != 0;
        xv = (o.xsrc == XS_BUS) ? 64'(bv) : mdl[b][o.xaddr];
        yv = (o.ysrc == YS_ROM) ? rom[b][o.yaddr] : (o.ysrc == YS_RAM) ? mdl[b][o.yaddr[2:0]] : 1;
        pr = mulmod(f, f ? xv % md[b] : xv, yv, md[b]);
        if (!f) pr = pmod(pmul(xv, yv), md[b]);
        unique case (o.mode)
          M_MAC:   res = addm(f, mdl[b][o.accaddr], pr, md[b], 0);
          M_MSC:   res = addm(f, mdl[b][o.accaddr], pr, md[b], 1);
          default: res = pr;
        endcase
        if (o.mode == M_MSC && f && mdl[b][o.accaddr] < pr) n_sub_wrap++;
        issue(o, en, bv);
        // one cycle after issue the destination still holds its old value
        rd_base = o.base; rd_addr = o.daddr;
        #1;
        checks++;
        if (64'(rd_data) != mdl[b][o.daddr]) begin
          failures++;
          $display("FAIL write visible too early");
        end
        if (en) mdl[b][o.daddr] = res; else n_disabled++;
        @(negedge clk);
        rd_base = o.base; rd_addr = o.daddr;
        #1;
        checks++;
        if (64'(rd_data) != mdl[b][o.daddr]) begin
          failures++;
          $display("FAIL op %p en=%0d: got %h expected %h", o, en, rd_data, mdl[b][o.daddr]);
        end
        it++;
      end
      check_rams();
      // column accumulator: clear, accumulate L raw products, propagate
      issue('{mode: M_RCLR, base: BASE_A, xsrc: XS_ZERO, xaddr: '0, ysrc: YS_ONE, yaddr: '0,
              accaddr: '0, daddr: '0}, 1'b1, '0);
      cacc = '0;
      it = 0;
      while (it < L) begin
        bv = $urandom;
        issue('{mode: M_RACC, base: BASE_A, xsrc: XS_BUS, xaddr: '0, ysrc: YS_ROM,
                yaddr: ROM_AW'(rom_wlimb(L, it)), accaddr: '0, daddr: '0}, 1'b1, bv);
        if (f) cacc = cacc + DW'(64'(bv) * rom[0][rom_wlimb(L, it)]);
        else   cacc = cacc ^ DW'(pmul(64'(bv), rom[0][rom_wlimb(L, it)]));
        it++;
      end
      @(negedge clk);
      checks++;
      if ({chain_out, limb} != cacc) begin
        failures++;
        $display("FAIL column sum %h expected %h", {chain_out, limb}, cacc);
      end
      chain_in = (R+LW)'($urandom);
      issue('{mode: M_RPROP, base: BASE_A, xsrc: XS_ZERO, xaddr: '0, ysrc: YS_ONE, yaddr: '0,
              accaddr: '0, daddr: '0}, 1'b1, '0);
      @(negedge clk);
      cacc = f ? DW'(cacc[R-1:0]) + DW'(chain_in) : DW'(cacc[R-1:0]) ^ DW'(chain_in);
      checks++;
      if ({chain_out, limb} != cacc) begin
        failures++;
        $display("FAIL carry propagation %h expected %h", {chain_out, limb}, cacc);
      end
      fi++;
    end
    checks++;
    if (n_sub_wrap == 0 || n_disabled == 0) begin
      failures++;
      $display("FAIL coverage: wrapped subtractions %0d, disabled writes %0d", n_sub_wrap,
               n_disabled);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
