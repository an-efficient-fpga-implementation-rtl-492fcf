// dfa: dual-field full-adder cell.
//
// A full adder built from two half adders whose carry output is gated by the
// field-select signal.  With fsel = 1 (GF(p), integers) it is an ordinary full
// adder; with fsel = 0 (GF(2^n), polynomials) the carry is forced to 0 and the
// sum is the XOR of the three inputs, i.e. a GF(2) addition.
// Purely combinational.  The two-half-adder structure and the gated carry
// follow the dual-field cell of the architecture; the polarity fsel = 1 for
// integers is taken from the adder/subtractor description.
module dfa (
  input  logic x,
  input  logic y,
  input  logic cin,
  input  logic fsel,   // 1: integer (GF(p)), 0: polynomial (GF(2^n))
  output logic s,
  output logic c
);
  logic s1, c1, c2;
  // first half adder
  assign s1 = x ^ y;
  assign c1 = x & y;
  // second half adder
  assign s  = s1 ^ cin;
  assign c2 = s1 & cin;
  // carry, eliminated in GF(2^n) mode
  assign c  = (c1 | c2) & fsel;
endmodule
