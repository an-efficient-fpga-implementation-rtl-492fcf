// tb_dmr: checks the dual-field modular reduction unit (r = 32, h = 10).
// Integer mode: z must equal c mod (2^32 - mu), computed with the
// testbench's own 64-bit arithmetic.  Polynomial mode: z must equal
// c(x) mod (x^32 + mu(x)), computed by long division in the testbench.
// Random and extreme inputs (all ones, values just above multiples of m).
// Reduction modulo 2^r - mu / x^r + mu(x) follows the architecture; the
// operand mix is this testbench's own.
module tb_dmr;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] c;
  logic [9:0]  mu;
  logic        fsel;
  logic [31:0] z;

  dmr #(.R(32), .H(10)) dut (.c(c), .mu(mu), .fsel(fsel), .z(z));

  function automatic logic [31:0] polymod(input logic [63:0] v, input logic [9:0] m);
    logic [64:0] mm;
    logic [63:0] r = v;
    for (int i = 63; i >= 32; i--)
      if (r[i]) begin
        mm = ({33'b0, 22'b0, m} | (65'd1 << 32)) << (i - 32);
        r ^= mm[63:0];
      end
    return r[31:0];
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] m;
    for (int i = 0; i < 6000; i++) begin
      mu   = 10'($urandom);
      if (i % 9 == 0) mu = 10'h3ff;
      if (i % 13 == 0) mu = 10'd1;
      fsel = 1'($urandom);
      c    = {$urandom, $urandom};
      m    = 64'h1_0000_0000 - 64'(mu);
      if (i % 5 == 0) c = '1;
      if (i % 7 == 0) c = m * 64'($urandom % 32'hffff_f000) + 64'($urandom % 3);
      if (i % 17 == 0) c = m - 64'(i % 2);
      @(posedge clk);
      checks++;
      if (fsel ? (z !== 32'(c % m)) : (z !== polymod(c, mu))) begin
        failures++;
        $display("FAIL fsel=%0d c=%h mu=%h got %h exp %h", fsel, c, mu, z,
                 fsel ? 32'(c % m) : polymod(c, mu));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
