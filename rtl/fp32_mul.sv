// fp32_mul: IEEE 754 single-precision multiplier.
//
// It plays the role of one hardened floating-point DSP block configured for a
// single multiplication. Combinational: y = a * b.
//
// How it works: the two 24-bit significands (hidden bit restored) are
// multiplied into a 48-bit product, which is normalised by at most one
// position; the exponents are added and rebiased; the product is rounded to
// nearest, ties to even, using the guard bit and the OR of the bits below it.
//
// The reference design fixes only the format. This design's choices: subnormal inputs
// read as zero, results below the smallest normal flush to a signed zero,
// overflow gives a signed infinity, NaN in or inf * 0 gives 0x7FC00000.
module fp32_mul
  import fb_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        s;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [47:0] p;
  logic [23:0] m;
  logic        g, st, up;
  logic [24:0] mr;
  int          e;

  always_comb begin
    s      = a[31] ^ b[31];
    ea     = a[30:23];
    eb     = b[30:23];
    ma     = {1'b1, a[22:0]};
    mb     = {1'b1, b[22:0]};
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_nan  = (ea == 8'hFF) && (a[22:0] != 23'd0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 23'd0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == 23'd0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == 23'd0);

    p = {24'd0, ma} * {24'd0, mb};
    e = int'(ea) + int'(eb) - 127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = (p[22:0] != 23'd0);
      e  = e + 1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = (p[21:0] != 22'd0);
    end
    up = g && (st || m[0]);
    mr = {1'b0, m} + {24'd0, up};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = FP32_QNAN;
    else if (a_inf || b_inf)
      y = {s, 8'hFF, 23'd0};
    else if (a_zero || b_zero || e <= 0)
      y = {s, 31'd0};
    else if (e >= 255)
      y = {s, 8'hFF, 23'd0};
    else
      y = {s, e[7:0], mr[22:0]};
  end

endmodule
