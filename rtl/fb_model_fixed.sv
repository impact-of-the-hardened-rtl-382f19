// fb_model_fixed: real-time full-bridge converter model in fixed point.
//
// Same plant, same forward-Euler equations and same structure as the float32
// model (branch selection, source selector, two subtractors, two constant
// multipliers, two accumulating state registers), but every signal is a
// signed integer with FW fraction bits:
//   iL(k)   = iL(k-1)   + dt/L * (vsel - vout(k-1))
//   vout(k) = vout(k-1) + dt/C * (iL(k-1) - iR)
// vg, iR, iL and vout all use the state format: IW integer bits (sign
// included) and FW fraction bits. The step constants dt/L and dt/C are signed
// integers with KF fraction bits in KW bits, computed at elaboration from
// DT_NS, L_UH and C_UF. Each product is rounded to FW fraction bits (half an
// LSB added, then an arithmetic right shift).
//
// The reference design describes this version only as fixed point with widths picked
// per variable by w = ceil(log2(x/dx)) + n, n about 8 or more, and shows that
// the widths grow as dt shrinks. The default widths (Q10.30 states; dt/L and
// dt/C with 48 fraction bits in 48-bit words) follow that rule for the default
// 12.5 ns step and leave room for steps up to 12.5 us. The
// rounding, and the saturation of each state at its most positive or negative
// value with a sticky overflow flag, are this design's choices.
//
// One clock with en = 1 is one integration step. Synchronous, active-high
// reset clears iL, vout and ovf.
module fb_model_fixed
  import fb_pkg::*;
#(
  parameter real DT_NS = 12.5,
  parameter real L_UH  = 900.0,
  parameter real C_UF  = 100.0,
  parameter int  IW    = FX_IW,
  parameter int  FW    = FX_FW,
  parameter int  KF    = FX_KF,
  parameter int  KW    = FX_KW,
  localparam int W     = IW + FW
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  sw_t                 sw,
  input  logic signed [W-1:0] vg,
  input  logic signed [W-1:0] ir,
  output logic signed [W-1:0] il,
  output logic signed [W-1:0] vout,
  output dq_t                 dq,
  output logic                ovf
);

  localparam logic signed [KW-1:0] K_DT_L = KW'(real_to_fix(DT_NS / (L_UH * 1000.0), KF));
  localparam logic signed [KW-1:0] K_DT_C = KW'(real_to_fix(DT_NS / (C_UF * 1000.0), KF));
  localparam int PW = W + 1 + KW;           // product width
  localparam logic signed [W+1:0] SMAX = (W + 2)'((longint'(1) <<< (W - 1)) - 1);
  localparam logic signed [W+1:0] SMIN = -(W + 2)'(longint'(1) <<< (W - 1));

  // The step constants must fit their signed KW-bit containers.
  if (real_to_fix(DT_NS / (C_UF * 1000.0), KF) >= (longint'(1) <<< (KW - 1)) ||
      real_to_fix(DT_NS / (L_UH * 1000.0), KF) >= (longint'(1) <<< (KW - 1))) begin : g_kw_check
    $error("fb_model_fixed: KW too small for dt/L or dt/C with KF fraction bits");
  end

  logic signed [W-1:0]  il_q, vout_q, vsel;
  logic signed [W:0]    vl, ic;
  logic signed [PW-1:0] p_il, p_vo;
  logic signed [W+1:0]  il_sum, vo_sum;
  logic signed [W-1:0]  il_next, vout_next;
  logic                 il_ovf, vo_ovf;

  branch_select u_branch (
    .sw     (sw),
    .il_neg (il_q < 0),
    .il_pos (il_q > 0),
    .dq     (dq)
  );

  always_comb begin
    unique case (dq)
      DQ_10:   vsel = vg;
      DQ_01:   vsel = -vg;
      default: vsel = '0;
    endcase
    vl   = (W + 1)'(vsel) - (W + 1)'(vout_q);
    ic   = (W + 1)'(il_q) - (W + 1)'(ir);
    p_il = PW'(vl) * PW'(K_DT_L);
    p_vo = PW'(ic) * PW'(K_DT_C);
    il_sum = (W + 2)'(il_q)   + (W + 2)'((p_il + (PW'(1) <<< (KF - 1))) >>> KF);
    vo_sum = (W + 2)'(vout_q) + (W + 2)'((p_vo + (PW'(1) <<< (KF - 1))) >>> KF);
    il_ovf = (il_sum > SMAX) || (il_sum < SMIN);
    vo_ovf = (vo_sum > SMAX) || (vo_sum < SMIN);
    if (il_sum > SMAX)      il_next = W'(SMAX);
    else if (il_sum < SMIN) il_next = W'(SMIN);
    else                    il_next = W'(il_sum);
    if (vo_sum > SMAX)      vout_next = W'(SMAX);
    else if (vo_sum < SMIN) vout_next = W'(SMIN);
    else                    vout_next = W'(vo_sum);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      il_q   <= '0;
      vout_q <= '0;
      ovf    <= 1'b0;
    end else if (en) begin
      il_q   <= il_next;
      vout_q <= vout_next;
      if (il_ovf || vo_ovf) ovf <= 1'b1;
    end
  end

  assign il   = il_q;
  assign vout = vout_q;

endmodule
