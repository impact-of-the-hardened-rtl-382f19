// fp32_addsub: IEEE 754 single-precision adder / subtractor.
//
// It plays the role of one hardened floating-point DSP block configured for a
// single addition (the subtractors and accumulators of the converter model).
// y = a + b when sub = 0, y = a - b when sub = 1. Purely combinational: the
// model closes its feedback loop through it within one clock, as the
// non-pipelined hardened-core version does.
//
// How it works: the operand of larger magnitude is kept, the other one is
// aligned to it with three extra bits (guard, round, sticky), the two
// significands are added or subtracted, the result is renormalised with a
// leading-zero count and rounded to nearest, ties to even.
//
// The reference design fixes only the format (8-bit exponent, 24-bit significand).
// The following are this design's choices: subnormal inputs are read as zero
// and results below the smallest normal are flushed to zero (signed); an
// exact cancellation gives +0; infinities propagate; NaN in, or inf - inf,
// gives the quiet NaN 0x7FC00000.
module fp32_addsub
  import fb_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es, d;
  logic [23:0] ma, mb, ml, ms;
  logic        a_nan, b_nan, a_inf, b_inf;
  logic [26:0] al, sm, mn;
  logic [27:0] sum;
  logic        sticky, up, zero_res;
  logic [4:0]  lz;
  logic        found;
  logic [24:0] mr;
  int          e;

  always_comb begin
    sa    = a[31];
    sb    = b[31] ^ sub;
    ea    = a[30:23];
    eb    = b[30:23];
    ma    = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb    = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    a_nan = (ea == 8'hFF) && (a[22:0] != 23'd0);
    b_nan = (eb == 8'hFF) && (b[22:0] != 23'd0);
    a_inf = (ea == 8'hFF) && (a[22:0] == 23'd0);
    b_inf = (eb == 8'hFF) && (b[22:0] == 23'd0);

    // Larger magnitude first.
    if ({eb, mb} > {ea, ma}) begin
      sl = sb; el = eb; ml = mb;
      ss = sa; es = ea; ms = ma;
    end else begin
      sl = sa; el = ea; ml = ma;
      ss = sb; es = eb; ms = mb;
    end

    // Align the smaller significand, collecting the bits shifted out.
    d  = el - es;
    sm = {ms, 3'b000};
    if (d >= 8'd27) begin
      al     = 27'd0;
      sticky = (ms != 24'd0);
    end else begin
      al     = sm >> d;
      sticky = (sm & ((27'd1 << d) - 27'd1)) != 27'd0;
    end
    al[0] = al[0] | sticky;

    if (sl != ss) sum = {1'b0, ml, 3'b000} - {1'b0, al};
    else          sum = {1'b0, ml, 3'b000} + {1'b0, al};

    // Normalise.
    e  = int'(el);
    lz = 5'd0;
    found = 1'b0;
    for (int i = 26; i >= 0; i--) begin
      if (!found) begin
        if (sum[i]) found = 1'b1;
        else        lz    = lz + 5'd1;
      end
    end
    if (sum[27]) begin
      mn = {sum[27:2], sum[1] | sum[0]};
      e  = e + 1;
    end else begin
      mn = sum[26:0] << lz;
      e  = e - int'(lz);
    end
    zero_res = (sum == 28'd0);

    // Round to nearest, ties to even.
    up = mn[2] && (mn[1] || mn[0] || mn[3]);
    mr = {1'b0, mn[26:3]} + {24'd0, up};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = FP32_QNAN;
    else if (a_inf)
      y = {sa, 8'hFF, 23'd0};
    else if (b_inf)
      y = {sb, 8'hFF, 23'd0};
    else if (zero_res)
      y = {sl & ss, 31'd0};          // -0 only for (-0) + (-0)
    else if (e <= 0)
      y = {sl, 31'd0};
    else if (e >= 255)
      y = {sl, 8'hFF, 23'd0};
    else
      y = {sl, e[7:0], mr[22:0]};
  end

endmodule
