// Self-checking testbench of fp_mul: random operands over a wide exponent range
// and special cases (zeros of both signs, products that overflow or underflow),
// compared with double-precision products rounded to single precision.
module tb_fp_mul;
  import fp_ref_pkg::*;

  word_t a, b, p;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .p(p));

  task automatic check(word_t x, word_t y);
    word_t exp_p;
    a = x; b = y;
    #1;
    exp_p = fmul_ref(x, y);
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3f80_0000, 32'h4000_0000);   // 1 * 2
    check(32'h0000_0000, 32'hc000_0000);   // 0 * -2
    check(32'h8000_0000, 32'h8000_0000);   // -0 * -0
    check(32'h3fc0_0000, 32'h3fc0_0000);   // 1.5 * 1.5 needs normalisation
    check(32'h7f00_0000, 32'h7f00_0000);   // overflow
    check(32'h0100_0000, 32'h0100_0000);   // underflow to zero
    check(32'h3f80_0001, 32'h3f80_0001);   // rounding
    for (int k = 0; k < 5000; k++) check(rand_fp(), rand_fp());
    for (int k = 0; k < 2000; k++) check({1'($urandom), 8'(64 + $urandom % 128), 23'($urandom)},
                                         {1'($urandom), 8'(64 + $urandom % 128), 23'($urandom)});
    // short significands: exact products with guard bit set and nothing below (ties)
    for (int k = 0; k < 3000; k++) check({1'($urandom), 8'(120 + $urandom % 16), 12'($urandom), 11'd0},
                                         {1'($urandom), 8'(120 + $urandom % 16), 12'($urandom), 11'd0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
