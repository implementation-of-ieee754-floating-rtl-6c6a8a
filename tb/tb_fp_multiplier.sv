// tb_fp_multiplier: end-to-end check of the single-precision multiplier at its
// default (and only) configuration.
//
// The reference is independent of the RTL: each operand is turned into a
// real number, the two are multiplied in double precision (exact, since a
// 24x24-bit significand product needs only 48 bits), and the double's bit
// pattern is cut back to single precision by re-biasing its exponent and
// keeping the top 23 fraction bits, i.e. truncating like the design does.
// Operands are normal numbers whose product exponent stays inside the normal
// range, the domain the design is built for.
//
// Counted mechanisms: products in [1,2) (no normalization shift) and products
// in [2,4) (one-place shift with exponent increment); each must occur, as
// must both result signs. The paper's worked example -18.0 * 9.5 = -171.0 is
// checked first. The multiplier is combinational, so each check samples the
// outputs one time step after the inputs change (zero-cycle latency).
`timescale 1ns/1ps
module tb_fp_multiplier;
  logic        signa, signb;
  logic [22:0] mantissaA, mantissaB;
  logic [7:0]  exponenta, exponentb;
  logic [47:0] result;
  logic [31:0] floatingresult;
  int checks = 0, failures = 0;
  int n_shift = 0, n_noshift = 0, n_neg = 0, n_pos = 0;

  fp_multiplier dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(input logic s, input logic [7:0] e, input logic [22:0] m);
    real v;
    v = (1.0 + real'(m) / 8388608.0) * (2.0 ** (real'(e) - 127.0));
    return s ? -v : v;
  endfunction

  task automatic check(input logic sa, input logic [7:0] ea, input logic [22:0] ma,
                       input logic sb, input logic [7:0] eb, input logic [22:0] mb);
    real pa, pb, pr, sig;
    logic [63:0] d;
    logic [31:0] expected;
    longint unsigned exp_result;
    signa = sa; exponenta = ea; mantissaA = ma;
    signb = sb; exponentb = eb; mantissaB = mb;
    #1;
    pa = to_real(sa, ea, ma);
    pb = to_real(sb, eb, mb);
    pr = pa * pb;
    d  = $realtobits(pr);
    expected = {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
    // significand product as an integer: (1.ma * 1.mb) * 2^46
    sig = (1.0 + real'(ma) / 8388608.0) * (1.0 + real'(mb) / 8388608.0);
    exp_result = longint'(sig * (2.0 ** 46));
    if (sig >= 2.0) n_shift++; else n_noshift++;
    if (expected[31]) n_neg++; else n_pos++;
    checks++;
    if (floatingresult !== expected || 64'(result) !== exp_result) begin
      failures++;
      $display("FAIL %h * %h: got %h/%h expected %h/%h",
               {sa, ea, ma}, {sb, eb, mb}, floatingresult, result, expected, exp_result);
    end
  endtask

  initial begin
    // -18.0 * 9.5 = -171.0 -> 0xC32B0000, significand product 0x558000000000
    check(1'b1, 8'b10000011, 23'b00100000000000000000000,
          1'b0, 8'b10000010, 23'b00110000000000000000000);
    checks++;
    if (floatingresult !== 32'hC32B0000 || result !== 48'h558000000000) begin
      failures++;
      $display("FAIL worked example: %h %h", floatingresult, result);
    end
    check(1'b0, 8'd127, '0, 1'b0, 8'd127, '0);     // 1.0 * 1.0
    check(1'b1, 8'd128, '1, 1'b1, 8'd100, '1);     // largest significands
    for (int i = 0; i < 20000; i++) begin
      int ea, eb, lo, hi;
      ea = 1 + int'($urandom_range(253));
      lo = (128 - ea > 1) ? 128 - ea : 1;
      hi = (380 - ea < 254) ? 380 - ea : 254;
      eb = lo + int'($urandom_range(hi - lo));
      check(1'($urandom), 8'(ea), 23'($urandom), 1'($urandom), 8'(eb), 23'($urandom));
    end
    $display("mechanisms: normalize_shift=%0d no_shift=%0d negative=%0d positive=%0d",
             n_shift, n_noshift, n_neg, n_pos);
    checks++;
    if (n_shift == 0 || n_noshift == 0 || n_neg == 0 || n_pos == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
