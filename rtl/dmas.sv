// dmas: dual-field modular / normal adder-subtractor.
//
// Two dual-field CLAs.  The top one (r bits) forms x + y or x - y
// (y inverted and carry-in 1 for subtraction), carry c1.  The second one
// (r + LW bits) works in one of two ways, chosen by conv_mode:
//   conv_mode = 1 (modular):  it adds -m (addition) or +m (subtraction) to
//     the top result, carry c2; the corrected value is taken when
//       addition:    c1 | c2   (x + y >= m)
//       subtraction: !c1       (x - y < 0)
//     so z = <x +/- y>_m for x, y < m (zero-extended to W bits).
//   conv_mode = 0 (normal):   it adds/subtracts the upper r+LW bits of x and
//     y with the top adder's carry, and z is the concatenation of both
//     adders, a plain W = 2r+LW-bit adder/subtractor.
// With fsel = 0 (GF(2^n)) all carries vanish: in modular mode z is the top
// adder's x ^ y; in normal mode z is the full-width x ^ y.
// Combinational.  The two-adder organisation, the mode signals and the
// concatenated normal mode follow the architecture.  Encodings this design
// chose: add_sub = 1 means subtraction; the full-width XOR in GF(2^n) normal
// mode (used by residue-to-binary conversion of polynomials).
module dmas #(
  parameter int unsigned R  = 32,
  parameter int unsigned LW = 7            // ceil(log2 L), at least 1
) (
  input  logic [2*R+LW-1:0] x,
  input  logic [2*R+LW-1:0] y,
  input  logic [R-1:0]      m,             // modulus (modular mode)
  input  logic              add_sub,       // 0: x + y, 1: x - y
  input  logic              conv_mode,     // 1: modular, 0: normal (wide)
  input  logic              fsel,          // 1: GF(p), 0: GF(2^n)
  output logic [2*R+LW-1:0] z
);
  localparam int unsigned W  = 2*R + LW;
  localparam int unsigned W2 = R + LW;

  logic         sub;
  assign sub = add_sub & fsel;             // polynomial subtraction is addition

  // top adder: low r bits
  logic [R-1:0] s1;
  logic         c1;
  df_cla #(.W(R)) u_top (.x(x[R-1:0]), .y(y[R-1:0] ^ {R{sub}}), .cin(sub), .fsel(fsel),
                         .s(s1), .cout(c1));

  // operand multiplexers of the second adder
  logic [W2-1:0] x2, y2;
  logic          cin2;
  always_comb begin
    if (conv_mode) begin
      x2   = {{LW{1'b0}}, s1};
      y2   = {{LW{1'b0}}, m ^ {R{~add_sub}}};   // -m for addition, +m for subtraction
      cin2 = ~add_sub;
    end else begin
      x2   = x[W-1:R];
      y2   = y[W-1:R] ^ {W2{sub}};
      cin2 = c1;
    end
  end

  logic [W2-1:0] s2;
  logic          co2;
  df_cla #(.W(W2)) u_bot (.x(x2), .y(y2), .cin(cin2), .fsel(fsel), .s(s2), .cout(co2));

  // c2: carry out of the r-bit part of the correction addition
  logic c2, corr;
  assign c2   = s2[R];
  assign corr = fsel & ((~add_sub & (c1 | c2)) | (add_sub & ~c1));

  always_comb begin
    if (conv_mode) z = {{(W-R){1'b0}}, corr ? s2[R-1:0] : s1};
    else           z = {s2, s1};
  end
endmodule
