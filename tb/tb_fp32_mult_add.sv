// tb_fp32_mult_add: self-checking test of the float32 multiply-add
// y = a*b + c, checked against the product rounded to single precision and
// then added with single-precision rounding (the two-rounding convention).
// Operands resemble the plant's use: a small step constant, a difference of
// up to a few hundred, and a state variable.
module tb_fp32_mult_add;
  timeunit 1ns;
  timeprecision 1ps;
  import tb_fp_ref_pkg::*;

  logic [31:0] a, b, c, y;
  int          checks = 0, failures = 0;

  fp32_mult_add dut (.a(a), .b(b), .c(c), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] tc);
    logic [31:0] exp_y;
    exp_y = add_ref(mul_ref(ta, tb_), tc);
    a = ta; b = tb_; c = tc;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h*%h+%h: got %h expected %h", ta, tb_, tc, y, exp_y);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10000; i++)
      check(rand_fp(100, 120), rand_fp(110, 135), rand_fp(110, 135));
    for (int i = 0; i < 10000; i++)
      check(rand_fp(60, 190), rand_fp(60, 190), rand_fp(60, 190));
    // 1.25e-4 * 8 + 100 : exact in single precision.
    check(32'h3903_126F, 32'h4100_0000, 32'h42C8_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
