// tb_df_cla: random and corner-case check of the dual-field CLA at two widths
// (32 bits, three lookahead levels, and 13 bits, two levels).  Integer mode
// must give x + y + cin with its carry out; polynomial mode must give x ^ y
// with no carry out.
// The expected behaviour (carries killed when fsel = 0) follows the
// architecture; the test mix is this testbench's own.
module tb_df_cla;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] x32, y32, s32;
  logic [12:0] x13, y13, s13;
  logic        cin, fsel, co32, co13;

  df_cla #(.W(32)) dut32 (.x(x32), .y(y32), .cin(cin), .fsel(fsel), .s(s32), .cout(co32));
  df_cla #(.W(13)) dut13 (.x(x13), .y(y13), .cin(cin), .fsel(fsel), .s(s13), .cout(co13));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] e32;
    logic [13:0] e13;
    for (int i = 0; i < 4000; i++) begin
      x32 = $urandom; y32 = $urandom;
      if (i % 7 == 0) y32 = ~x32;              // long carry chains
      if (i % 11 == 0) x32 = '1;
      x13 = 13'($urandom); y13 = 13'($urandom);
      if (i % 5 == 0) y13 = ~x13;
      cin = 1'($urandom); fsel = 1'($urandom);
      @(posedge clk);
      if (fsel) begin
        e32 = {1'b0, x32} + {1'b0, y32} + 33'(cin);
        e13 = {1'b0, x13} + {1'b0, y13} + 14'(cin);
      end else begin
        e32 = {1'b0, x32 ^ y32};
        e13 = {1'b0, x13 ^ y13};
      end
      checks += 2;
      if ({co32, s32} !== e32) begin
        failures++;
        $display("FAIL w32 fsel=%0d %h+%h+%0d got %h exp %h", fsel, x32, y32, cin, {co32, s32}, e32);
      end
      if ({co13, s13} !== e13) begin
        failures++;
        $display("FAIL w13 fsel=%0d %h+%h+%0d got %h exp %h", fsel, x13, y13, cin, {co13, s13}, e13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
