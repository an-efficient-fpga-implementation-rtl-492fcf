// Shared body of the DRAMM end-to-end testbenches.  The including module
// defines localparam L (units), the macros WATCHDOG (cycles) and DUT_INST
// and the test counts N_MUL, N_EXP, N_INV, DO_POLY.
//
// The testbench chooses its own moduli (greedy search for pairwise coprime
// 2^32 - mu and x^32 + mu(x), mu < 2^10), a field modulus p coprime to the
// base-B moduli, computes every constant of the units' constant stores with
// its own integer / polynomial arithmetic, loads them, runs commands and
// checks the binary results against wide reference arithmetic:
//   CMD_MULT: c*Q == a*b (mod p) and c < 2p   (polynomials: deg c < n)
//   CMD_EXP:  c == x^e (mod p)                 (inversion: e = p-2, 2^n-2)
// plus the residues of c left in the units, and the cycle count.
// The checked operations follow the architecture; the moduli search and
// the constant formulas are this design's (see rns_pkg).
import rns_pkg::*;
import tb_rns_util::*;

localparam int unsigned R  = 32;
localparam int unsigned H  = 10;
// wide reference values; the simulator's wide multiply / divide stops at
// 4096 bits, so field moduli are kept to at most PB bits
localparam int unsigned BW = (64 * L + 128 > 4096) ? 4096 : 64 * L + 128;
localparam int unsigned PB = (32 * L - 4 > 2040) ? 2040 : 32 * L - 4;
localparam int unsigned EWT = R * L;

logic clk = 1'b0;
always #5 clk = ~clk;
int checks = 0, failures = 0;
longint unsigned cycle = 0;
always @(posedge clk) cycle++;

logic              rst_n, fsel, cfg_we, start, cmd_exp, busy, done;
logic [$clog2(L)-1:0] cfg_unit;
base_e             cfg_base, res_base;
logic [ROM_AW-1:0] cfg_addr;
logic [R-1:0]      cfg_data;
logic [EWT-1:0]    exp_e;
logic [R-1:0]      a_in [L], b_in [L], c_bin [L], res_data [L];
logic [RAM_AW-1:0] res_addr;
logic [31:0]       n_rmm, n_sqr, n_mul;

`DUT_INST

// -------------------------------------------------------------- moduli
longint unsigned mA [2][L], mB [2][L], muA [2][L], muB [2][L];

task automatic find_moduli(bit f);
  longint unsigned cand [2*L];
  longint unsigned mus  [2*L];
  int n = 0;
  for (int mu = 1; mu < 1024 && n < 2 * L; mu++) begin
    longint unsigned m;
    bit ok;
    m  = f ? (64'h1_0000_0000 - 64'(mu)) : (64'h1_0000_0000 | 64'(mu));
    ok = 1;
    if (!f && !mu[0]) continue;
    for (int j = 0; j < n; j++) if (!coprime(f, m, cand[j]) ) ok = 0;
    if (ok) begin cand[n] = m; mus[n] = 64'(mu); n++; end
  end
  checks++;
  if (n < 2 * L) begin
    failures++;
    $display("FAIL only %0d coprime moduli found for field %0d", n, f);
  end
  // alternate the two bases
  for (int i = 0; i < L; i++) begin
    mA[f][i] = cand[2*i];   muA[f][i] = mus[2*i];
    mB[f][i] = cand[2*i+1]; muB[f][i] = mus[2*i+1];
  end
endtask

// -------------------------------------------------------------- wide reference
function automatic logic [BW-1:0] bmul(bit f, logic [BW-1:0] x, logic [BW-1:0] y);
  logic [BW-1:0] r = '0;
  if (f) return x * y;
  for (int i = 0; i < BW; i++) if (x[i]) r ^= y << i;
  return r;
endfunction

function automatic int bdeg(logic [BW-1:0] v);
  int d = -1;
  for (int i = 0; i < BW; i++) if (v[i]) d = i;
  return d;
endfunction

function automatic logic [BW-1:0] bmod(bit f, logic [BW-1:0] x, logic [BW-1:0] p);
  int dp;
  if (f) return x % p;
  dp = bdeg(p);
  for (int i = BW - 1; i >= dp; i--) if (x[i]) x ^= p << (i - dp);
  return x;
endfunction

// residue of a wide value modulo a small modulus, digit by digit
function automatic longint unsigned bsmall(bit f, logic [BW-1:0] x, longint unsigned m);
  longint unsigned r = 0;
  for (int i = BW / 32 - 1; i >= 0; i--) begin
    longint unsigned t;
    t = (r << 32) | 64'(x[32*i +: 32]);
    r = f ? t % m : pmod(t, m);
  end
  return r;
endfunction

function automatic logic [BW-1:0] bexp(bit f, logic [BW-1:0] x, logic [EWT-1:0] e,
                                       logic [BW-1:0] p);
  logic [BW-1:0] acc = 1;
  for (int i = EWT - 1; i >= 0; i--) begin
    acc = bmod(f, bmul(f, acc, acc), p);
    if (e[i]) acc = bmod(f, bmul(f, acc, x), p);
  end
  return acc;
endfunction

logic [BW-1:0] p_big, q_big;
int            n_deg;                   // polynomial field degree n

function automatic logic [BW-1:0] rand_big(int bits);
  logic [BW-1:0] v = '0;
  for (int i = 0; i < BW / 32; i++) v[32*i +: 32] = $urandom;
  if (bits < BW) v &= (BW'(1) << bits) - 1;
  return v;
endfunction

// Miller-Rabin test with a few fixed bases (integers)
function automatic bit is_prime(logic [BW-1:0] p);
  logic [BW-1:0] d, x;
  int sh;
  bit ok;
  int bases [5] = '{2, 3, 5, 7, 11};
  d = p - 1;
  sh = 0;
  while (!d[0]) begin d >>= 1; sh++; end
  foreach (bases[j]) begin
    x = bexp(1, BW'(bases[j]), EWT'(d), p);
    if (x == 1 || x == p - 1) continue;
    ok = 0;
    for (int i = 1; i < sh; i++) begin
      x = bmod(1, bmul(1, x, x), p);
      if (x == p - 1) begin ok = 1; break; end
    end
    if (!ok) return 0;
  end
  return 1;
endfunction

function automatic logic [BW-1:0] bgcd_poly(logic [BW-1:0] a, logic [BW-1:0] b);
  logic [BW-1:0] t;
  while (b != 0) begin
    t = bmod(0, a, b);
    a = b;
    b = t;
  end
  return a;
endfunction

// Rabin irreducibility test of a degree-n polynomial over GF(2)
function automatic bit is_irreducible(logic [BW-1:0] p, int n);
  logic [BW-1:0] y;
  int m;
  // x^(2^(n/q)) - x must be coprime to p for every prime q dividing n
  m = n;
  for (int q = 2; q <= m; q++) begin
    if (m % q != 0) continue;
    while (m % q == 0) m /= q;
    y = BW'(2);
    for (int i = 0; i < n / q; i++) y = bmod(0, bmul(0, y, y), p);
    if (bdeg(bgcd_poly(p, y ^ BW'(2))) != 0) return 0;
  end
  y = BW'(2);
  for (int i = 0; i < n; i++) y = bmod(0, bmul(0, y, y), p);
  return y == BW'(2);
endfunction

task automatic choose_p(bit f, bit field);
  bit ok;
  q_big = 1;
  for (int i = 0; i < L; i++) q_big = bmul(f, q_big, BW'(mB[f][i]));
  n_deg = (32 * L - 8 > 2040) ? 2040 : 32 * L - 8;
  do begin
    p_big = rand_big(f ? PB : n_deg + 1);
    p_big[0] = 1'b1;
    p_big[f ? PB - 1 : n_deg] = 1'b1;
    ok = 1;
    for (int i = 0; i < L; i++) if (!coprime(f, bsmall(f, p_big, mB[f][i]), mB[f][i])) ok = 0;
    // a true field (prime p, irreducible p(x)) only where inversion is tested
    if (ok && field) ok = f ? is_prime(p_big) : is_irreducible(p_big, n_deg);
  end while (!ok);
endtask

// constant-store writes are first collected in a table, then played out
// one per clock
localparam int unsigned NCFG = L * 2 * (4 * L + 4);
int unsigned     cq_unit [NCFG];
int unsigned     cq_base [NCFG];
int unsigned     cq_addr [NCFG];
longint unsigned cq_data [NCFG];
int unsigned     cq_n;

function automatic void cfg_write(int unit, base_e b, int addr, longint unsigned data);
  cq_unit[cq_n] = unit;
  cq_base[cq_n] = b;
  cq_addr[cq_n] = addr;
  cq_data[cq_n] = data;
  cq_n++;
endfunction

task automatic cfg_play();
  int unsigned n;
  n = 0;
  while (n < cq_n) begin
    cfg_we   <= 1'b1;
    cfg_unit <= $clog2(L)'(cq_unit[n]);
    cfg_base <= base_e'(cq_base[n]);
    cfg_addr <= ROM_AW'(cq_addr[n]);
    cfg_data <= R'(cq_data[n]);
    @(posedge clk);
    n++;
  end
  cfg_we <= 1'b0;
  @(posedge clk);
endtask

task automatic load_constants(bit f);
  cq_n = 0;
  for (int i = 0; i < L; i++) begin
    for (int bb = 0; bb < 2; bb++) begin
      base_e b;
      longint unsigned m, mu, w, pr, pm;
      logic [BW-1:0]   wbig;
      b  = base_e'(bb);
      m  = bb ? mB[f][i] : mA[f][i];
      mu = bb ? muB[f][i] : muA[f][i];
      // binary-to-residue radix <2^(32k)>_m
      w = 1;
      for (int k = 0; k < L; k++) begin
        cfg_write(i, b, rom_radix(k), w);
        w = f ? (w << 32) % m : pmod(w << 32, m);
      end
      // MRC weights in the own base, extension weights in the other base
      w = 1;
      for (int k = 0; k < L; k++) begin
        cfg_write(i, b, rom_wown(L, k), w);
        w = mulmod(f, w, (bb ? mB[f][k] : mA[f][k]) % (f ? m : 64'hffff_ffff_ffff_ffff), m);
      end
      w = 1;
      for (int k = 0; k < L; k++) begin
        cfg_write(i, b, rom_woth(L, k), w);
        w = mulmod(f, w, f ? ((bb ? mA[f][k] : mB[f][k]) % m)
                           : pmod(bb ? mA[f][k] : mB[f][k], m), m);
      end
      // residue-to-binary weights: limb i of W_k = prod_{j<k} own moduli
      wbig = 1;
      for (int k = 0; k < L; k++) begin
        cfg_write(i, b, rom_wlimb(L, k), 64'(wbig[32*i +: 32]));
        wbig = bmul(f, wbig, BW'(bb ? mB[f][k] : mA[f][k]));
      end
      // V_i
      pr = 1;
      for (int j = 0; j < i; j++)
        pr = mulmod(f, pr, f ? ((bb ? mB[f][j] : mA[f][j]) % m) : pmod(bb ? mB[f][j] : mA[f][j], m), m);
      cfg_write(i, b, rom_v(L), invmod(f, pr, m));
      pm = bsmall(f, p_big, m);
      if (!bb) begin
        cfg_write(i, b, rom_k1(L), pm);
        cfg_write(i, b, rom_k2(L), invmod(f, bsmall(f, q_big, m), m));
      end else begin
        w = invmod(f, pm, m);
        cfg_write(i, b, rom_k1(L), f ? ((m - w) % m) : w);
        cfg_write(i, b, rom_k2(L), 0);
      end
      cfg_write(i, b, rom_mu(L), mu);
    end
  end
  cfg_play();
endtask

// -------------------------------------------------------------- operations
logic [BW-1:0] c_res;
longint unsigned last_cycles;
int n_int_ops = 0, n_poly_ops = 0, n_exp_ops = 0, n_inv_ops = 0, n_wide = 0;

task automatic run(bit f, bit is_exp, logic [BW-1:0] a, logic [BW-1:0] b, logic [EWT-1:0] e);
  longint unsigned t0;
  int bb;
  fsel <= f;
  cmd_exp <= is_exp;
  exp_e <= e;
  for (int i = 0; i < L; i++) begin
    a_in[i] <= a[32*i +: 32];
    b_in[i] <= b[32*i +: 32];
  end
  @(posedge clk);
  start <= 1'b1;
  t0 = cycle;
  @(posedge clk);
  start <= 1'b0;
  while (!done) @(posedge clk);
  last_cycles = cycle - t0;
  c_res = '0;
  for (int i = 0; i < L; i++) c_res[32*i +: 32] = c_bin[i];
  // residues of c left in the units
  bb = 0;
  while (bb < 2) begin
    res_base <= base_e'(bb);
    res_addr <= RA_C;
    @(posedge clk);
    #1;
    for (int i = 0; i < L; i++) begin
      longint unsigned m;
      m = bb ? mB[f][i] : mA[f][i];
      checks++;
      if (64'(res_data[i]) != bsmall(f, c_res, m)) begin
        failures++;
        $display("FAIL residue of c, base %0d unit %0d: %h vs %h", bb, i, res_data[i],
                 bsmall(f, c_res, m));
      end
    end
    bb++;
  end
endtask

task automatic check_mult(bit f);
  logic [BW-1:0] a, b, lhs, rhs;
  if (f) begin
    a = bmod(1, rand_big(32 * L), p_big << 1);
    b = bmod(1, rand_big(32 * L), p_big << 1);
  end else begin
    a = rand_big(n_deg);
    b = rand_big(n_deg);
  end
  run(f, 0, a, b, '0);
  lhs = bmod(f, bmul(f, c_res, bmod(f, q_big, p_big)), p_big);
  rhs = bmod(f, bmul(f, a, b), p_big);
  checks += 3;
  if (lhs != rhs) begin
    failures++;
    $display("FAIL mult f=%0d: c*Q != a*b mod p", f);
  end
  if (f ? (c_res >= (p_big << 1)) : (bdeg(c_res) >= n_deg)) begin
    failures++;
    $display("FAIL mult f=%0d: result out of range", f);
  end
  if (last_cycles != 64'(14 * L + 19)) begin
    failures++;
    $display("FAIL mult latency %0d, expected %0d", last_cycles, 14 * L + 19);
  end
  if (f) n_int_ops++; else n_poly_ops++;
  if (f && c_res[32 * ((PB - 1) / 32) +: 32] != 0) n_wide++;
endtask

task automatic check_exp(bit f, logic [EWT-1:0] e, bit inversion);
  logic [BW-1:0] x, mont, ref_v;
  int sq0, mu0;
  x    = f ? bmod(1, rand_big(32 * L), p_big) : rand_big(n_deg);
  if (x == 0) x = 3;
  mont = bmod(f, q_big, p_big);
  mont = bmod(f, bmul(f, mont, mont), p_big);       // Q^2 mod p
  sq0 = int'(n_sqr); mu0 = int'(n_mul);
  run(f, 1, x, mont, e);
  ref_v = bexp(f, x, e, p_big);
  checks += 2;
  if (bmod(f, c_res, p_big) != ref_v) begin
    failures++;
    $display("FAIL exp f=%0d", f);
  end
  if (inversion) begin
    checks++;
    if (bmod(f, bmul(f, c_res, x), p_big) != 1) begin
      failures++;
      $display("FAIL inversion f=%0d: x * x^-1 != 1", f);
    end
    n_inv_ops++;
  end
  if (int'(n_sqr) - sq0 == 0 && e > 1) begin
    failures++;
    $display("FAIL exp f=%0d: no squaring counted", f);
  end
  n_exp_ops++;
endtask

initial begin : watchdog
  repeat (`WATCHDOG) @(posedge clk);
  failures++;
  $display("FAIL watchdog");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

initial begin
  logic [EWT-1:0] e;
  int fi, t;
  bit f;
  rst_n = 1'b0; fsel = 1'b1; cfg_we = 1'b0; start = 1'b0; cmd_exp = 1'b0;
  cfg_unit = '0; cfg_base = BASE_A; cfg_addr = '0; cfg_data = '0; exp_e = '0;
  res_base = BASE_A; res_addr = RA_C;
  for (int i = 0; i < L; i++) begin a_in[i] = '0; b_in[i] = '0; end
  repeat (3) @(posedge clk);
  rst_n = 1'b1;
  @(posedge clk);
  // loops that wait on the clock are written as while loops
  fi = 1;
  while (fi >= 0) begin
    f = fi[0];
    if (f || DO_POLY) begin
      find_moduli(f);
      choose_p(f, N_INV > 0);
      load_constants(f);
      t = 0;
      while (t < N_MUL) begin check_mult(f); t++; end
      t = 0;
      while (t < N_EXP) begin
        e = '0;
        e[31:0] = $urandom | 32'h8000_0001;
        check_exp(f, e, 0);
        t++;
      end
      t = 0;
      while (t < N_INV) begin
        // Fermat inversion: x^(p-2) in GF(p), x^(2^n-2) in GF(2^n)
        e = f ? EWT'(p_big - 2) : ((EWT'(1) << n_deg) - 2);
        check_exp(f, e, 1);
        t++;
      end
    end
    fi--;
  end
  // every mechanism must have occurred
  checks += 4;
  if (n_int_ops == 0) begin failures++; $display("FAIL no GF(p) multiplication"); end
  if (DO_POLY && n_poly_ops == 0) begin failures++; $display("FAIL no GF(2^n) multiplication"); end
  if (N_EXP > 0 && (n_exp_ops == 0 || n_sqr == 0 || n_mul == 0)) begin
    failures++; $display("FAIL exponentiation squarings/multiplications not exercised");
  end
  if (n_wide == 0) begin failures++; $display("FAIL no result reached the top limb of p"); end
  $display("ops: int %0d poly %0d exp %0d inv %0d, rmm %0d sqr %0d mul %0d, cycles/mult %0d",
           n_int_ops, n_poly_ops, n_exp_ops, n_inv_ops, n_rmm, n_sqr, n_mul, 14 * L + 19);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
