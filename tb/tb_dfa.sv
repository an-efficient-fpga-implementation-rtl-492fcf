// tb_dfa: exhaustive check of the dual-field full adder.  For both field
// modes and all eight input combinations the sum must be the XOR of the
// inputs, and the carry must be the majority function in integer mode and 0
// in polynomial mode.
// The expected behaviour (carry forced to 0 when fsel = 0) follows the
// architecture; the exhaustive test is this testbench's own.
module tb_dfa;
  logic x, y, cin, fsel, s, c;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  dfa dut (.x(x), .y(y), .cin(cin), .fsel(fsel), .s(s), .c(c));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int v = 0; v < 8; v++) begin
        {x, y, cin} = v[2:0];
        fsel = f[0];
        @(posedge clk);
        checks++;
        if (s !== (x ^ y ^ cin) || c !== (f[0] & ((x & y) | (x & cin) | (y & cin)))) begin
          failures++;
          $display("FAIL fsel=%0d in=%03b s=%0d c=%0d", f, v[2:0], s, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
