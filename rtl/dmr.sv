// dmr: dual-field modular reduction of a 2r-bit product.
//
// Moduli have the special form m = 2^r - mu (integers) or m = x^r + mu(x)
// (polynomials over GF(2)) with mu only h bits wide, so that 2^r == mu and
// x^r == mu(x) modulo m.  The reduction folds the upper half twice:
//   d  = c_lo + mu * c_hi                  (h+r+1 bits; DM + 3-input CLA)
//   x  = d_lo + mu * d_hi                  (r+1 bits;   DM + 3-input CLA)
//   y  = x + mu                            (= x - m + 2^r)
//   z  = (y >= 2^r) ? y - 2^r : x          (final subtraction of m)
// In GF(2^n) mode (fsel = 0) all adders are XORs, y never reaches 2^r and
// z = x, already of degree < r.  Valid inputs: c < 2^(2r) and
// 2^(2h+1) + 2*mu <= 2^r (true for r = 32, h = 10), which keeps x < 2m.
// Combinational.  The two-fold structure with two DMs and CLAs and the final
// selection by a carry follow the reduction unit of the architecture; the
// final "+mu" adder is placed after the x adder (in series) rather than beside
// it, which is this design's choice.
module dmr #(
  parameter int unsigned R = 32,
  parameter int unsigned H = 10
) (
  input  logic [2*R-1:0] c,
  input  logic [H-1:0]   mu,
  input  logic           fsel,
  output logic [R-1:0]   z
);
  localparam int unsigned D = H + R + 1;   // width of the first fold
  localparam int unsigned E = 2*H + 1;     // width of mu * d_hi

  // first fold: d = c_lo + mu * c_hi
  logic [H+R-1:0] m1s, m1c;
  dm #(.WA(H), .WB(R)) u_dm1 (.a(mu), .b(c[2*R-1:R]), .fsel(fsel), .ps(m1s), .pc(m1c));

  logic [D-1:0] f1s, f1c, d;
  logic         d_co;
  df_csa3 #(.W(D)) u_csa1 (.x({1'b0, m1s}), .y({1'b0, m1c}), .z({{(D-R){1'b0}}, c[R-1:0]}),
                           .fsel(fsel), .s(f1s), .c(f1c));
  df_cla #(.W(D)) u_cla1 (.x(f1s), .y(f1c), .cin(1'b0), .fsel(fsel), .s(d), .cout(d_co));

  // second fold: x = d_lo + mu * d_hi
  logic [E-1:0] m2s, m2c;
  dm #(.WA(H), .WB(H+1)) u_dm2 (.a(mu), .b(d[D-1:R]), .fsel(fsel), .ps(m2s), .pc(m2c));

  logic [R:0] f2s, f2c, xs;
  logic       x_co;
  df_csa3 #(.W(R+1)) u_csa2 (.x({{(R+1-E){1'b0}}, m2s}), .y({{(R+1-E){1'b0}}, m2c}),
                             .z({1'b0, d[R-1:0]}), .fsel(fsel), .s(f2s), .c(f2c));
  df_cla #(.W(R+1)) u_cla2 (.x(f2s), .y(f2c), .cin(1'b0), .fsel(fsel), .s(xs), .cout(x_co));

  // final correction: y = x + mu, select on y >= 2^r
  logic [R+1:0] ys;
  logic         y_co;
  df_cla #(.W(R+2)) u_cla3 (.x({1'b0, xs}), .y({{(R+2-H){1'b0}}, mu}), .cin(1'b0),
                            .fsel(fsel), .s(ys), .cout(y_co));

  assign z = (ys[R+1] | ys[R]) ? ys[R-1:0] : xs[R-1:0];
endmodule
