// tb_fp32_addsub: self-checking test of the float32 adder/subtractor.
// Random operands over a wide exponent range, close operands that cancel,
// far-apart exponents, rounding ties and special values are compared with
// the correctly rounded result computed on reals.
module tb_fp32_addsub;
  timeunit 1ns;
  timeprecision 1ps;
  import tb_fp_ref_pkg::*;

  logic [31:0] a, b, y;
  logic        sub;
  int          checks = 0, failures = 0;

  fp32_addsub dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic ts,
                       input logic [31:0] exp_y);
    a = ta; b = tb_; sub = ts;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h %s %h: got %h expected %h", ta, ts ? "-" : "+", tb_, y, exp_y);
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
    logic [31:0] ra, rb;
    logic        rs;
    // Random operands.
    for (int i = 0; i < 20000; i++) begin
      ra = rand_fp(60, 190);
      rb = (i % 2 == 0) ? rand_fp(60, 190) : rand_fp(int'(ra[30:23]) - 30 < 1 ? 1 : int'(ra[30:23]) - 30,
                                                  int'(ra[30:23]) + 2);
      rs = 1'($urandom);
      check(ra, rb, rs, rs ? sub_ref(ra, rb) : add_ref(ra, rb));
    end
    // Near cancellation: same exponent, few differing low bits.
    for (int i = 0; i < 5000; i++) begin
      ra = rand_fp(100, 150);
      rb = ra ^ 32'($urandom_range(255));
      if (i % 3 == 0) rb[30:23] = ra[30:23] - 8'd1;
      check(ra, rb, 1'b1, sub_ref(ra, rb));
      check(ra, {~rb[31], rb[30:0]}, 1'b0, add_ref(ra, {~rb[31], rb[30:0]}));
    end
    // Directed values.
    check(32'h3F80_0000, 32'h3F80_0000, 1'b0, 32'h4000_0000);  // 1 + 1 = 2
    check(32'h3F80_0000, 32'h3F80_0000, 1'b1, 32'h0000_0000);  // 1 - 1 = +0
    check(32'h4340_0000, 32'h3F80_0000, 1'b1, 32'h433F_0000);  // 192 - 1 = 191
    check(32'h3F80_0000, 32'h3380_0000, 1'b0, 32'h3F80_0000);  // 1 + 2^-24: tie to even
    check(32'h3F80_0001, 32'h3380_0000, 1'b0, 32'h3F80_0002);  // tie rounds up to even
    check(32'h3F80_0000, 32'h3380_0001, 1'b0, 32'h3F80_0001);  // above the tie
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0, 32'h7F80_0000);  // overflow -> +inf
    check(32'h7F80_0000, 32'h3F80_0000, 1'b0, 32'h7F80_0000);  // inf + 1
    check(32'h7F80_0000, 32'h7F80_0000, 1'b1, 32'h7FC0_0000);  // inf - inf = NaN
    check(32'h8000_0000, 32'h0000_0000, 1'b0, 32'h0000_0000);  // -0 + +0 = +0
    check(32'h8000_0000, 32'h0000_0000, 1'b1, 32'h8000_0000);  // -0 - +0 = -0
    check(32'h0000_0001, 32'h3F80_0000, 1'b0, 32'h3F80_0000);  // subnormal read as 0
    check(32'h0080_0001, 32'h0080_0000, 1'b1, 32'h0000_0000);  // tiny result flushed
    check(32'hC2C8_0000, 32'h4348_0000, 1'b0, 32'h42C8_0000);  // -100 + 200 = 100
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
