# Dual-field residue Montgomery multiplier

Public-key cryptography needs modular multiplication of very long operands. RSA
uses GF(p) with 1024- to 2048-bit integers. Binary-field elliptic curves use
GF(2^n) with polynomials. This design handles both by splitting each long operand
into many short, independent residues.

- An integer is represented by its remainders modulo L small moduli
  m_i = 2^r − mu_i (an RNS, residue number system).
- A polynomial is represented by its remainders modulo
  m_i(x) = x^r + mu_i(x) (a PRNS, polynomial RNS).

Additions and multiplications then run on all L residues in parallel, one MAC
unit per residue, with no carries between them. Only a few steps need the units
to talk to each other:

- conversion into residues
- the base conversions inside Montgomery multiplication
- conversion back to binary

The integer and polynomial cases share one datapath. A single signal, `fsel`,
picks the field:

- `fsel = 1`: GF(p). Adders carry normally.
- `fsel = 0`: GF(2^n). Every adder cell forces its carry to 0, so each addition
  becomes an XOR. Each multiplication becomes a carry-less product.

The defaults are:

| Parameter | Default | Meaning |
|---|---|---|
| r | 32 | residue word length |
| h | 10 | width of each mu_i |
| L | 66 | MAC units, and moduli per base |

Each base spans a residue range of about 2^2112. That is enough for a 2048-bit
GF(p) modulus.

## Arithmetic building blocks

All blocks below take `fsel`. They compute the integer result when it is 1 and
the GF(2)-polynomial result when it is 0.

| Module | What it is |
|---|---|
| `dfa` | Dual-field full adder: two half adders, with the carry out ANDed with `fsel`. |
| `df_cla` | Carry-lookahead adder of any width, described below. |
| `df_csa3` | One row of `dfa` cells: a 3:2 carry-save compressor. |
| `dm` | r×r multiplier, described below. |
| `dmr` | Modular reduction of a 2r-bit product, described below. |
| `dmas` | Modular/normal adder-subtractor, described below. |

**`df_cla`.** Each bit produces a generate signal (x&y), a carry-alive signal
(x|y) and a propagate signal (x^y). A hierarchy of 4-bit carry-lookahead groups
turns these into the carries. Each carry is ANDed with `fsel` before it is
XORed into the sum.

**`dm`.** The partial products are the AND of every pair of operand bits. A
linear array of `df_csa3` rows sums them. The output stays in carry-save form
(two 2r-bit words). One `df_cla` after the multiplier resolves it.

**`dmr`.** It reduces a 2r-bit product c modulo 2^r − mu. It uses the fact that
2^r ≡ mu, and takes three steps:

1. Fold once: `d = c_lo + mu·c_hi`. The result has h+r+1 bits.
2. Fold again: `x = d_lo + mu·d_hi`. The result has r+1 bits.
3. Compute `y = x + mu`. If y reaches 2^r, then x ≥ m, and the output is
   `y mod 2^r`. Otherwise the output is x.

For polynomials the same circuit computes c mod (x^r + mu(x)), because the carries
are gone.

**`dmas`.** It has two adders.

- The top r-bit adder forms x ± y.
- In modular mode (`conv_mode = 1`), the bottom adder forms the corrected value
  (x + y − m, or x − y + m). The carries choose between the two adders' results.
  - Addition takes the corrected value if the top adder carried or the bottom
    one did not borrow.
  - Subtraction takes the corrected value if the top adder borrowed.
- In normal mode (`conv_mode = 0`), the two adders are chained into one
  (2r + log2 L)-bit adder-subtractor. Residue-to-binary conversion uses this
  mode.
- With `fsel = 0`, only the XOR from the top adder is used.

## The MAC unit (`mac_unit`)

Each unit holds the residue channel of one modulus of base A (p_i) and one of
base B (q_i). Its storage is:

- `RAM1` / `RAM2`: 8 data words per base. The layout is in `rns_pkg`: a, b, s,
  t, v, c, an accumulator and the unit's mixed-radix digit.
- A constant store per base. It is described in the next section.
- `mu` for each base.

Every unit executes the same micro-operation (`rns_pkg::mac_op_t`) each cycle.
A per-unit enable decides whether the unit writes its result. The operation
names:

- the base
- the X operand: a RAM word, the broadcast bus, or zero
- the Y operand: a constant, a RAM word, or 1
- what to do with the product, one of:
  - `M_MUL`: store it
  - `M_MAC`: add it to a RAM word
  - `M_MSC`: subtract it from a RAM word
  - `M_RCLR` / `M_RACC` / `M_RPROP`: the column-accumulator operations for
    output conversion

The unit is a two-stage pipeline:

1. **Stage 1:** DM, the carry-propagate adder and DMR, all combinational,
   ending in register `R1`.
2. **Stage 2:** DMAS and the RAM write.

A result written at the end of stage 2 is visible two clock edges after the
operation was presented. The sequencer spaces dependent operations to match.

For the output conversion the unit also has a (2r + log2 L)-bit column
accumulator `R2`. Its bits above r go to the next unit as `chain_out`, which
carries the sum upward.

## Constants

The constant store is written through the top's `cfg_*` port. It is not fixed,
so one netlist serves any field modulus p and any set of moduli. The host
computes the constants once per modulus set and p. For unit i, with own-base
moduli m_0 … m_(L−1) and other-base moduli m'_j:

| Address | Contents |
|---|---|
| `rom_radix(k) = k` | ⟨2^(rk)⟩_{m_i} (or ⟨x^(rk)⟩), binary→residue weights |
| `rom_wown(L,k)` | ⟨∏_{j<k} m_j⟩_{m_i}, mixed-radix update weights |
| `rom_woth(L,k)` | ⟨∏_{j<k} m'_j⟩_{m_i}, base-extension weights |
| `rom_wlimb(L,k)` | r-bit limb i of W_k = ∏_{j<k} p_j (base A only), residue→binary |
| `rom_v(L)` | V_i = ⟨(∏_{j<i} m_j)^−1⟩_{m_i} |
| `rom_k1(L)` | base A: ⟨p⟩_{p_i}; base B: ⟨−p^−1⟩_{q_i} (GF(p)) or ⟨p^−1⟩_{q_i} (GF(2^n)) |
| `rom_k2(L)` | base A: ⟨Q^−1⟩_{p_i}, Q = ∏ q_j |
| `rom_mu(L)` | mu_i (write-only) |

The moduli of both bases must be pairwise coprime. They must also be coprime
to p, and p must be odd (or p(x) must have a nonzero constant term).

## Montgomery multiplication in residues

`dramm_ctrl` sequences the whole array. A Montgomery multiplication computes
c = a·b·Q^−1 mod p in five steps:

1. **Product.** s = a·b in both bases.
2. **Quotient.** t = s·(−p^−1) in base B.
3. **Base conversion B → A of t, by mixed-radix conversion (MRC).** Each digit k
   takes four cycles:
   1. Unit k forms the digit U_k = acc_k·V_k.
   2. Unit k puts U_k on the bus.
   3. Units above k of base B update acc_j −= U_k·⟨∏_{j<k} q_j⟩.
   4. Every unit of base A adds U_k·⟨∏_{j<k} q_j⟩_{p_i} into its copy of t.

   MRC is exact. Unlike CRT-based conversions, it needs no correction term.
4. **Reduction.** v = s + t·p, then c = v·Q^−1, both in base A.
5. **Base conversion A → B of c**, by the same procedure. Every unit keeps the
   mixed-radix digits of c.

For integers, inputs and output are below 2p. The condition is 4p ≤ Q and
2p ≤ P, where P = ∏ p_i. Because the output stays in that range, results can
be fed straight back in.

**Exponentiation.** `cmd_exp = 1` computes c = a^e mod p:

1. A first multiplication by b = Q² mod p enters the Montgomery domain.
2. Left-to-right square-and-multiply runs over the exponent bits below the
   leading one.
3. A final multiplication by 1 leaves the Montgomery domain.

Inversion is the exponent p − 2 (or 2^n − 2).

## Conversions to and from binary

**Input conversion.** Each r-bit digit a_k of the input goes on the bus in
turn. Every unit accumulates a_k·⟨2^(rk)⟩ modulo its own modulus, for both
operands and both bases. This takes 4L cycles.

**Output conversion.** The result is rebuilt from its base-A mixed-radix digits
as z = Σ_k U_k·W_k, with W_k = p_0 ⋯ p_(k−1). This is a sum of L products,
each up to L words long. It is laid out as columns: unit i owns bit range
[ri, ri + r) of z.

1. Every unit clears `R2`.
2. For each k, digit U_k is broadcast. Unit i adds the full 2r-bit product
   U_k × limb_i(W_k) into its (2r + log2 L)-bit column sum. This step uses the
   normal (non-modular) DMAS mode.
3. L + 2 carry-propagation passes follow. In each pass, every unit replaces its
   column sum with (its own low r bits) + (the bits above r from the unit
   below).

Afterwards `c_bin[i]` holds limb i of c. In GF(2^n) the carries are zero, so
the passes change nothing. The output conversion takes 2L + 3 cycles.

## Interface and timing (`dramm_top`)

Ports:

| Port | Use |
|---|---|
| `cfg_we`, `cfg_unit`, `cfg_base`, `cfg_addr`, `cfg_data` | Constant loading. |
| `a_in[L]`, `b_in[L]` | Operands as little-endian r-bit digits. Polynomial coefficient of x^(ri+j) = bit j of digit i. |
| `start`, `cmd_exp`, `exp_e` | Command. Hold the inputs until `done`. |
| `busy`, `done` (one-cycle pulse), `c_bin[L]` | Result. |
| `res_base`, `res_addr`, `res_data[L]` | Read any RAM word of every unit while idle, e.g. the residues of c. |
| `n_rmm`, `n_sqr`, `n_mul` | Operation counters. |

Cycle counts:

| Phase | Cycles |
|---|---|
| Input conversion | 4L |
| One Montgomery multiplication | 8L + 13 |
| Output conversion | 2L + 3 |
| `start` to `done` for one multiplication | 14L + 19 (943 at L = 66) |

**Exponentiation cost.** It takes about bits(e) + ones(e) Montgomery
multiplications, plus the two conversions.

**Clocking and reset.** There is one clock. Reset is asynchronous and active
low. The RAMs and constant stores are not reset.

## Departures and limits

These are the choices this design makes where the architecture leaves room, or
differs from it:

- **Schedule.**
  - Base-conversion digits are processed one after another: one digit every
    4 cycles, with no overlap between units.
  - One MAC unit per modulus is built. Pairing units so that fewer units serve
    all moduli is not implemented.
- **Mixed-radix factors V_i.** They are multiplied in. The moduli therefore do
  not have to be chosen so that every V_i equals 1.
- **Multiplier.** `dm` sums its partial products with a linear carry-save array
  rather than a Wallace-style tree. The delay is longer and the logic is the same.
- **Constant store.** It is loadable rather than a ROM built at synthesis
  time. Its size is 4L + 3 words per base per unit.
- **`dmr`.** It has no internal pipeline register. `R1` in the MAC unit is the
  only register between multiplier and adder.
- **GF(2^n) at L = 66.** This needs 132 pairwise coprime x^32 + mu(x) with
  deg mu < 10. A greedy search finds only 91. At the full default size,
  therefore, only GF(p) can be populated with moduli of this form. GF(2^n)
  works at smaller L, or with a larger h.
- **Full-size simulation.** The full-size test uses a 2040-bit p, because the
  testbench's wide reference arithmetic stops at 4096-bit products. The
  hardware accepts p up to about 2109 bits.

## Simulation

Testbenches are in `tb/`. Each is self-checking and prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_dfa` | all 16 input combinations |
| `tb_df_cla` | 8000 random and edge sums, both fields |
| `tb_dm` | random and edge products against integer and carry-less references |
| `tb_dmr` | reduction against the remainder, both fields |
| `tb_dmas` | modular add/sub with wrap and correction cases, normal 71-bit add/sub, XOR |
| `tb_mac_unit` | random micro-operations against a RAM model, the two-cycle write latency, column sums and carry propagation |
| `tb_dramm_top` | L = 4, both fields, details below |
| `tb_dramm_full` | default size L = 66, one Montgomery multiplication and one exponentiation in GF(p), with 132 moduli |

`tb_dramm_top` finds its own moduli and a prime p (or an irreducible p(x)). It
computes and loads every constant, then runs:

- Montgomery multiplications, checking c·Q ≡ a·b and the range of c
- exponentiations
- an inversion

It checks the latency of 14L + 19 cycles. It also checks that every mechanism
occurred.

Example with plain verilator, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_dramm_top \
    -y rtl -y tb +libext+.sv -Itb rtl/rns_pkg.sv tb/tb_rns_util.sv tb/tb_dramm_top.sv
./obj_dir/Vtb_dramm_top
```

The same command works for the block testbenches with their names. The
full-size testbench compiles a large model (several minutes, about 8 GB of
memory) and then simulates for about 3.5 minutes.

To change the size, override `R`, `H` and `L` on `dramm_top`. The testbench body
`tb/tb_dramm_body.svh` takes L from the including module. The search for moduli
and p adapts to it.
