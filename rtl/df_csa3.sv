// df_csa3: one row of dual-field full adders reducing three W-bit operands to
// a sum word and a carry word (carry word already shifted left by one).
// With fsel = 0 the carry word is zero and the sum word is x ^ y ^ z.
// Used in front of a df_cla to build the three-input adders of the modular
// reduction unit.  Combinational.  The carry out of the top bit is dropped;
// callers size W so that the full sum fits.
// A plain row of dual-field full adders as the architecture builds its
// multiplier from; packaging it as a separate row module is this design's choice.
module df_csa3 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic         fsel,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] co;
  for (genvar i = 0; i < W; i++) begin : g_bit
    dfa u_dfa (.x(x[i]), .y(y[i]), .cin(z[i]), .fsel(fsel), .s(s[i]), .c(co[i]));
  end
  if (W > 1) begin : g_shift
    assign c = {co[W-2:0], 1'b0};
  end else begin : g_one
    assign c = 1'b0;
  end
endmodule
