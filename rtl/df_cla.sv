// df_cla: dual-field carry-lookahead adder, W bits.
//
// Each bit position has a GAP cell producing p_i = x_i ^ y_i, g_i = x_i & y_i
// and alpha_i = x_i | y_i.  Carries are produced by a hierarchy of 4-bit
// carry-lookahead generator groups (enough levels for W+1 positions; three
// levels cover up to 63 bits) using the AND-OR form
//   c_{i+1} = g_i | alpha_i g_{i-1} | ... | alpha_i..alpha_0 c_0 .
// Every carry entering a sum XOR, and the carry out, is ANDed with fsel, so
// with fsel = 0 the adder returns x ^ y (GF(2^n) addition) and with fsel = 1
// the integer sum x + y + cin.  Combinational, no internal state.
// The GAP / CLG / fsel-gated-carry structure follows the dual-field CLA of the
// architecture; the generic level count for widths other than 4 is this
// design's own generalisation.
module df_cla #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  input  logic         fsel,
  output logic [W-1:0] s,
  output logic         cout
);
  // number of 4-bit lookahead levels so that 4^LV >= W+1
  function automatic int unsigned levels(int unsigned n);
    int unsigned lv = 1;
    int unsigned span = 4;
    while (span < n) begin
      lv++;
      span *= 4;
    end
    return lv;
  endfunction

  localparam int unsigned LV = levels(W + 1);
  localparam int unsigned N  = 4 ** LV;

  // carries into every bit position 0..N-1 from the lookahead tree
  function automatic logic [N-1:0] lookahead(input logic [N-1:0] g0, input logic [N-1:0] a0,
                                             input logic c0);
    logic [N-1:0] g [LV+1];
    logic [N-1:0] a [LV+1];
    logic [N-1:0] cr [LV+1];
    int unsigned  cnt;
    logic         cc;
    g[0] = g0;
    a[0] = a0;
    // generate / propagate of each group, level by level (CLG group terms)
    cnt = N;
    for (int unsigned l = 1; l <= LV; l++) begin
      g[l] = '0;
      a[l] = '0;
      cnt  = cnt / 4;
      for (int unsigned j = 0; j < cnt; j++) begin
        g[l][j] = g[l-1][4*j+3]
                | (a[l-1][4*j+3] & g[l-1][4*j+2])
                | (a[l-1][4*j+3] & a[l-1][4*j+2] & g[l-1][4*j+1])
                | (a[l-1][4*j+3] & a[l-1][4*j+2] & a[l-1][4*j+1] & g[l-1][4*j]);
        a[l][j] = &a[l-1][4*j +: 4];
      end
    end
    // carries, top level down: carry into element j of level l-1
    for (int unsigned l = 0; l <= LV; l++) cr[l] = '0;
    cr[LV][0] = c0;
    cnt = 1;
    for (int unsigned l = LV; l >= 1; l--) begin
      for (int unsigned j = 0; j < cnt; j++) begin
        for (int unsigned k = 0; k < 4; k++) begin
          cc = cr[l][j];
          for (int unsigned t = 0; t < k; t++)
            cc = g[l-1][4*j+t] | (a[l-1][4*j+t] & cc);
          cr[l-1][4*j+k] = cc;
        end
      end
      cnt = cnt * 4;
    end
    return cr[0];
  endfunction

  logic [N-1:0] gx, ax, px, cy;

  always_comb begin
    gx = '0;
    ax = '0;
    px = '0;
    gx[W-1:0] = x & y;     // GAP: generate
    ax[W-1:0] = x | y;     // GAP: alpha (carry transmit)
    px[W-1:0] = x ^ y;     // GAP: half sum
    cy = lookahead(gx, ax, cin);
  end

  assign s    = px[W-1:0] ^ (cy[W-1:0] & {W{fsel}});
  assign cout = cy[W] & fsel;
endmodule
