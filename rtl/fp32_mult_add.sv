// fp32_mult_add: single-precision multiply-add, y = a * b + c.
//
// It plays the role of one hardened floating-point DSP block in multiply-add
// mode: in the converter model, a is the step constant (dt/L or dt/C), b the
// voltage or current difference and c the state variable being integrated.
// Combinational.
//
// The product is rounded to single precision before the addition (two
// roundings, not a fused operation); the reference design does not say which the
// hardened block does, so this is this design's choice. Built from fp32_mul
// and fp32_addsub and shares their subnormal and special-value handling.
module fp32_mult_add
  import fb_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  fp32_t c,
  output fp32_t y
);

  fp32_t prod;

  fp32_mul u_mul (
    .a (a),
    .b (b),
    .y (prod)
  );

  fp32_addsub u_add (
    .a   (prod),
    .b   (c),
    .sub (1'b0),
    .y   (y)
  );

endmodule
