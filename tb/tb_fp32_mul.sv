// tb_fp32_mul: self-checking test of the float32 multiplier against the
// correctly rounded product computed on reals, plus special values.
module tb_fp32_mul;
  timeunit 1ns;
  timeprecision 1ps;
  import tb_fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int          checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h * %h: got %h expected %h", ta, tb_, y, exp_y);
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
    for (int i = 0; i < 20000; i++) begin
      ra = rand_fp(70, 180);
      rb = rand_fp(70, 180);
      check(ra, rb, mul_ref(ra, rb));
    end
    // Significands close to 2.0 exercise the rounding carry.
    for (int i = 0; i < 2000; i++) begin
      ra = {1'($urandom), 8'(120 + $urandom_range(10)), 15'h7FFF, 8'($urandom)};
      rb = {1'($urandom), 8'(120 + $urandom_range(10)), 15'h7FFF, 8'($urandom)};
      check(ra, rb, mul_ref(ra, rb));
    end
    // Exact ties: x * 1.5 = x + x/2 leaves exactly half an ulp when x is odd.
    for (int i = 0; i < 2000; i++) begin
      ra = rand_fp(100, 150);
      ra[0] = 1'b1;
      check(ra, 32'h3FC0_0000, mul_ref(ra, 32'h3FC0_0000));
    end
    check(32'h3F80_0001, 32'h3FC0_0000, 32'h3FC0_0002);  // (1+2^-23)*1.5: tie, up to even
    check(32'h4000_0000, 32'h4040_0000, 32'h40C0_0000);  // 2 * 3 = 6
    check(32'hC000_0000, 32'h0000_0000, 32'h8000_0000);  // -2 * 0 = -0
    check(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);  // inf * 0 = NaN
    check(32'h7F80_0000, 32'hBF80_0000, 32'hFF80_0000);  // inf * -1 = -inf
    check(32'h7F00_0000, 32'h4000_0000, 32'h7F80_0000);  // overflow
    check(32'h0080_0000, 32'h3F00_0000, 32'h0000_0000);  // underflow flushed
    check(32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0000);  // NaN in
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
