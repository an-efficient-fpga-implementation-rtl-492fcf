// tb_dmas: checks the dual-field adder/subtractor (r = 32, LW = 7).
// Modular mode: <x +/- y>_m for random x, y < m, integer and polynomial
// (polynomial result x ^ y).  Normal mode: 71-bit x +/- y, and in polynomial
// mode the full-width XOR.  Expected values come from the testbench's own
// wide arithmetic.  Operands are steered onto the edges: differences that
// wrap, sums that carry out of r bits and sums in [m, 2^r) that need the
// correction without a carry.
// Modular and normal modes follow the architecture's adder/subtractor; the
// operand mix is this testbench's own.
module tb_dmas;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_high = 0;

  logic [70:0] x, y, z, e;
  logic [31:0] m;
  logic        add_sub, conv_mode, fsel;

  dmas #(.R(32), .LW(7)) dut (.x(x), .y(y), .m(m), .add_sub(add_sub), .conv_mode(conv_mode),
                              .fsel(fsel), .z(z));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned xm, ym;
    for (int i = 0; i < 8000; i++) begin
      add_sub   = 1'($urandom);
      conv_mode = 1'($urandom);
      fsel      = 1'($urandom);
      m         = 32'hffff_ffff - 32'($urandom % 1024);
      if (conv_mode) begin
        xm = longint'($urandom) % longint'(m);
        ym = longint'($urandom) % longint'(m);
        if (i % 3 == 0) ym = longint'(m) - 1 - (xm % 5);
        // sum in [m, 2^r): above the modulus without a carry out of r bits
        if (i % 3 == 1 && xm > 1024)
          ym = longint'(m) - xm + longint'($urandom % (33'h1_0000_0000 - 33'(m)));
        x = 71'(xm);
        y = 71'(ym);
        if (!fsel) e = 71'(x[31:0] ^ y[31:0]);
        else if (!add_sub) e = 71'((xm + ym) % longint'(m));
        else e = 71'((xm + longint'(m) - ym) % longint'(m));
        if (fsel && ((!add_sub && xm + ym >= longint'(m)) || (add_sub && xm < ym))) n_wrap++;
        if (fsel && !add_sub && xm + ym >= longint'(m) && xm + ym < 64'h1_0000_0000) n_high++;
      end else begin
        x = {7'($urandom), $urandom, $urandom};
        y = {7'($urandom), $urandom, $urandom};
        if (!fsel) e = x ^ y;
        else e = add_sub ? x - y : x + y;
      end
      @(posedge clk);
      checks++;
      if (z !== e) begin
        failures++;
        $display("FAIL sub=%0d mod=%0d fsel=%0d x=%h y=%h m=%h got %h exp %h",
                 add_sub, conv_mode, fsel, x, y, m, z, e);
      end
    end
    // the modular correction path must have been exercised
    checks++;
    if (n_wrap < 100 || n_high < 50) begin
      failures++;
      $display("FAIL modular correction exercised only %0d times (%0d below 2^r)", n_wrap,
               n_high);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
