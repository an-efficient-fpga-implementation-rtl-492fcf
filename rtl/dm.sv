// dm: dual-field multiplier, WA x WB bits, result in carry-save form.
//
// The partial-product generator ANDs every bit of a with every bit of b.  The
// WA partial-product rows are then summed by a carry-save array of
// dual-field full-adder (dfa) cells: row j adds partial product j to the
// running sum/carry pair.  The two output words satisfy ps + pc = a * b
// (integer product) when fsel = 1.  When fsel = 0 every dfa carry is zero, pc
// is zero and ps is the carry-less (GF(2)[x]) product of the two polynomials.
// A two-input df_cla after this unit produces the binary product.
// Combinational.  Partial-product generation and summation with dfa cells in
// carry-save form follow the architecture; the summation order (a linear
// carry-save array rather than a Wallace-style tree) and the use of dfa cells
// in place of the half adders of the tree, so that no carry can survive in
// GF(2^n) mode, are this design's choices.
module dm #(
  parameter int unsigned WA = 4,
  parameter int unsigned WB = 4
) (
  input  logic [WA-1:0]    a,
  input  logic [WB-1:0]    b,
  input  logic             fsel,
  output logic [WA+WB-1:0] ps,
  output logic [WA+WB-1:0] pc
);
  localparam int unsigned W = WA + WB;

  // partial-product generator
  function automatic logic [W-1:0] pp(input logic [WA-1:0] av, input logic [WB-1:0] bv,
                                      input int unsigned j);
    logic [W-1:0] r;
    r = '0;
    r[WB-1:0] = bv & {WB{av[j]}};
    return r << j;
  endfunction

  // carry-save array, one dfa row per partial product after the first
  for (genvar j = 0; j < WA; j++) begin : g_row
    logic [W-1:0] s_row, c_row;
    if (j == 0) begin : g_first
      assign s_row = pp(a, b, 0);
      assign c_row = '0;
    end else begin : g_add
      logic [W-1:0] ppj;
      assign ppj = pp(a, b, j);
      df_csa3 #(.W(W)) u_csa (.x(g_row[j-1].s_row), .y(g_row[j-1].c_row), .z(ppj),
                              .fsel(fsel), .s(s_row), .c(c_row));
    end
  end

  assign ps = g_row[WA-1].s_row;
  assign pc = g_row[WA-1].c_row;
endmodule
