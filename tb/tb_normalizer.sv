// tb_normalizer: checks the normalizer on products in [2^46, 2^48), the range
// two 24-bit significands can produce. The reference finds the leading 1 by
// scanning down from the top bit, then takes the 23 bits below it.
`timescale 1ns/1ps
module tb_normalizer;
  localparam int unsigned FW = 23;
  localparam int unsigned PW = 2 * (FW + 1);
  logic [PW-1:0] product;
  logic [FW-1:0] fraction;
  logic          norm_shift;
  int checks = 0, failures = 0;
  int shifted = 0, unshifted = 0;

  normalizer #(.FRAC_W(FW)) dut (.product, .fraction, .norm_shift);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [PW-1:0] x);
    int lead;
    logic [FW-1:0] exp_frac;
    logic          exp_shift;
    product = x;
    #1;
    lead = -1;
    for (int k = PW - 1; k >= 0; k--) if (lead < 0 && x[k]) lead = k;
    exp_shift = (lead == PW - 1);
    for (int k = 0; k < FW; k++) exp_frac[FW-1-k] = x[lead-1-k];
    if (exp_shift) shifted++; else unshifted++;
    checks++;
    if (fraction !== exp_frac || norm_shift !== exp_shift) begin
      failures++;
      $display("FAIL product=%h got frac=%h shift=%0b expected frac=%h shift=%0b",
               x, fraction, norm_shift, exp_frac, exp_shift);
    end
  endtask

  initial begin
    check(48'h400000000000);          // exactly 1.0
    check(48'h558000000000);          // worked example, 1.0101011b
    check(48'h800000000000);          // exactly 2.0
    check(48'hFFFFFE000001);          // largest product
    check(48'h7FFFFFFFFFFF);          // just below 2.0
    for (int i = 0; i < 5000; i++) begin
      logic [PW-1:0] x;
      x = {$urandom, $urandom};
      if (x[PW-1] == 1'b0) x[PW-2] = 1'b1;  // keep the leading 1 in the top two bits
      check(x);
    end
    checks++;
    if (shifted == 0 || unshifted == 0) begin
      failures++;
      $display("FAIL shift cases not both exercised: %0d %0d", shifted, unshifted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
