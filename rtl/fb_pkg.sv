// fb_pkg: types and constants shared by the full-bridge HIL models.
//
// The converter model keeps two state variables, the inductor current iL and
// the output voltage vout, and updates them once per integration step dt with
// the forward-Euler difference equations of the bridge. Two arithmetics are
// provided: IEEE 754 single precision (the format of the hardened
// floating-point DSP blocks) and signed fixed point.
//
// This package holds the switch bundle, the branch code dq, the float32 word
// type, the default fixed-point format and two elaboration-time helpers that
// turn physical constants given as reals (dt/L, dt/C, 1/R) into a float32 word
// or a fixed-point integer. The helpers are only ever evaluated on parameters,
// never on run-time signals.
package fb_pkg;

  // One IEEE 754 single-precision word: sign, 8-bit exponent, 23-bit fraction.
  typedef logic [31:0] fp32_t;

  localparam fp32_t FP32_ZERO = 32'h0000_0000;
  localparam fp32_t FP32_QNAN = 32'h7FC0_0000;

  // Control signals of the four bridge switches, 1 = switch closed (ON).
  typedef struct packed {
    logic s1;
    logic s2;
    logic s3;
    logic s4;
  } sw_t;

  // Branch code {d, q}: d = current flows through the upper-left branch,
  // q = current flows through the upper-right branch.
  typedef enum logic [1:0] {
    DQ_00 = 2'b00,   // both low  : vL = -vout
    DQ_01 = 2'b01,   // d=0, q=1  : vL = -vg - vout
    DQ_10 = 2'b10,   // d=1, q=0  : vL =  vg - vout
    DQ_11 = 2'b11    // both high : vL = -vout
  } dq_t;

  // Default fixed-point format of the state variables: signed, FX_IW integer
  // bits (sign included) and FX_FW fraction bits. Chosen with the width rule
  // w = ceil(log2(x/dx)) + n for x up to a few hundred volts or tens of amps,
  // dx the smallest per-step increment at dt = 12.5 ns, and n >= 8.
  localparam int FX_IW = 10;
  localparam int FX_FW = 30;
  localparam int FX_W  = FX_IW + FX_FW;
  // Fraction bits of the step constants dt/L, dt/C and of 1/R.
  localparam int FX_KF = 48;
  localparam int FX_KW = 48;

  // Real -> float32, round to nearest even; values below the smallest normal
  // become zero. Elaboration-time only.
  function automatic fp32_t real_to_fp32(input real r);
    logic [63:0] d;
    logic [10:0] e11;
    int          e8;
    logic [23:0] m;
    logic        g, st;
    d   = $realtobits(r);
    e11 = d[62:52];
    e8  = int'(e11) - 1023 + 127;
    m   = {1'b0, d[51:29]};
    g   = d[28];
    st  = |d[27:0];
    if (g && (st || m[0])) m = m + 24'd1;
    if (m[23]) e8 = e8 + 1;   // fraction rounded up to 2.0
    if (e11 == 11'd0 || e8 <= 0) return {d[63], 31'd0};
    if (e8 >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e8), m[22:0]};
  endfunction

  // Real -> signed fixed point with FB fraction bits, rounded to nearest.
  function automatic longint real_to_fix(input real r, input int fb);
    return longint'(r * (2.0 ** fb));
  endfunction

endpackage
