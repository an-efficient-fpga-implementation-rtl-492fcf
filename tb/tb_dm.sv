// tb_dm: checks the dual-field multiplier at 32 x 32 and 10 x 11 bits.  In
// integer mode the carry-save pair must add up to the integer product; in
// polynomial mode the carry word must be zero and the sum word must equal
// the carry-less product computed by shift-and-XOR in the testbench.
// Integer and carry-less products are what the architecture's multiplier
// produces; the operand mix is this testbench's own.
module tb_dm;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] a, b;
  logic [63:0] ps, pc;
  logic [9:0]  a2;
  logic [10:0] b2;
  logic [20:0] ps2, pc2;
  logic        fsel;

  dm #(.WA(32), .WB(32)) dut  (.a(a),  .b(b),  .fsel(fsel), .ps(ps),  .pc(pc));
  dm #(.WA(10), .WB(11)) dut2 (.a(a2), .b(b2), .fsel(fsel), .ps(ps2), .pc(pc2));

  function automatic logic [63:0] clmul(input logic [31:0] u, input logic [31:0] v);
    logic [63:0] r = '0;
    for (int i = 0; i < 32; i++) if (u[i]) r ^= 64'(v) << i;
    return r;
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom;
      if (i < 4) begin a = '1; b = (i % 2) ? '1 : 32'd1; end
      a2 = 10'($urandom); b2 = 11'($urandom);
      fsel = 1'($urandom);
      @(posedge clk);
      checks += 2;
      if (fsel) begin
        if (ps + pc !== 64'(a) * 64'(b)) begin
          failures++;
          $display("FAIL int %h*%h got %h", a, b, ps + pc);
        end
        if (21'(ps2 + pc2) !== 21'(21'(a2) * 21'(b2))) begin
          failures++;
          $display("FAIL int small %h*%h got %h", a2, b2, ps2 + pc2);
        end
      end else begin
        if (pc !== '0 || ps !== clmul(a, b)) begin
          failures++;
          $display("FAIL poly %h*%h got %h/%h", a, b, ps, pc);
        end
        if (pc2 !== '0 || ps2 !== 21'(clmul(32'(a2), 32'(b2)))) begin
          failures++;
          $display("FAIL poly small %h*%h got %h", a2, b2, ps2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
