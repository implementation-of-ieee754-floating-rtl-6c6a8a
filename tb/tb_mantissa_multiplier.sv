// tb_mantissa_multiplier: checks the 24x24 significand multiplier against a
// product formed in double-precision real arithmetic, which is exact for
// 48-bit results. Corner operands (all ones, hidden-1 only) plus random ones.
`timescale 1ns/1ps
module tb_mantissa_multiplier;
  localparam int unsigned W = 24;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  mantissa_multiplier #(.OP_W(W)) dut (.port_opa(a), .port_opb(b), .port_result(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    real r;
    longint unsigned expected;
    a = x; b = y;
    #1;
    r = real'(x) * real'(y);
    expected = longint'(r);
    checks++;
    if (64'(p) !== expected) begin
      failures++;
      $display("FAIL %h * %h got %h expected %h", x, y, p, expected);
    end
  endtask

  initial begin
    check('1, '1);
    check(24'h800000, 24'h800000);
    check(24'h900000, 24'h980000);   // 1.001b * 1.0011b, the worked example
    check(0, 24'h123456);
    check(24'hFFFFFF, 1);
    for (int i = 0; i < 5000; i++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
