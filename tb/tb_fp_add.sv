// Self-checking testbench of fp_add: random operands, operands with equal or
// close exponents and opposite signs (cancellation and renormalisation), far
// apart exponents (sticky bit), zeros and exact cancellation, compared with
// double-precision sums rounded to single precision.
module tb_fp_add;
  import fp_ref_pkg::*;

  word_t a, b, s;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .s(s));

  task automatic check(word_t x, word_t y);
    word_t exp_s;
    a = x; b = y;
    #1;
    exp_s = fadd_ref(x, y);
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", x, y, s, exp_s);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t x;
    check(32'h3f80_0000, 32'h3f80_0000);   // 1 + 1
    check(32'h3f80_0000, 32'hbf80_0000);   // 1 - 1 = +0
    check(32'h8000_0000, 32'h8000_0000);   // -0 + -0 = -0
    check(32'h8000_0000, 32'h0000_0000);   // -0 + +0 = +0
    check(32'h4000_0000, 32'h0000_0000);
    check(32'h0000_0000, 32'hc0a0_0000);
    check(32'h3f80_0000, 32'h3380_0000);   // 1 + 2^-24: tie, to even
    check(32'h3f80_0001, 32'h3380_0000);   // tie, round up to even
    check(32'h3f80_0000, 32'hb380_0000);   // 1 - 2^-24
    check(32'h3f80_0000, 32'h0d80_0000);   // far apart
    check(32'h7f7f_ffff, 32'h7f7f_ffff);   // overflow
    for (int k = 0; k < 5000; k++) check(rand_fp(), rand_fp());
    for (int k = 0; k < 3000; k++) begin
      x = rand_fp();
      check(x, {~x[31], x[30:23] - 8'($urandom % 2), 23'($urandom)});
      check(x, {~x[31], x[30:0] ^ 31'(1 << ($urandom % 8))});
    end
    for (int k = 0; k < 2000; k++) begin
      x = rand_fp();
      check(x, {1'($urandom), x[30:23] - 8'(20 + $urandom % 40), 23'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
