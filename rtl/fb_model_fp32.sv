// fb_model_fp32: real-time full-bridge converter model in single precision.
//
// The plant is an H-bridge feeding an LC filter with a resistive load. Every
// integration step dt the model reads the four switch commands, the input
// voltage vg and the load current iR, and advances its two state variables
// with the forward-Euler equations
//   iL(k)   = iL(k-1)   + dt/L * (vsel - vout(k-1))
//   vout(k) = vout(k-1) + dt/C * (iL(k-1) - iR)
// where vsel is vg, -vg or 0 according to the branch code dq (branch_select,
// vsrc_mux). Both updates read the previous states, as in the schematic the
// reference design gives, where each state register feeds the other equation.
//
// Datapath, one hardened-core function each: two subtractors (vsel - vout,
// iL - iR) and two multiply-adds (dt/L * vL + iL, dt/C * iC + vout); the
// constants dt/L and dt/C are fixed at elaboration from DT_NS, L_UH, C_UF.
//
// PIPELINED = 0 (default, the reference design's main hardened-core version): the
//   whole loop is combinational and the states update on every clock with
//   en = 1, so one clock is one integration step.
// PIPELINED = 1 (the reference design's pipelined variant): the subtractor results
//   are registered; the states update only every second enabled clock, so an
//   integration step takes two clocks. Switches, vg and iR are sampled on the
//   first clock of the pair.
//
// step_done is high in each cycle whose clock edge updates the states. With
// PIPELINED = 0 it is just a copy of en; it exists so that both variants share
// one interface.
// Synchronous, active-high reset clears both states to +0 (converter off).
// The reset behaviour and the en input are this design's choices.
module fb_model_fp32
  import fb_pkg::*;
#(
  parameter real DT_NS     = 12.5,
  parameter real L_UH      = 900.0,
  parameter real C_UF      = 100.0,
  parameter bit  PIPELINED = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  sw_t   sw,
  input  fp32_t vg,
  input  fp32_t ir,
  output fp32_t il,
  output fp32_t vout,
  output dq_t   dq,
  output logic  step_done
);

  localparam fp32_t K_DT_L = real_to_fp32(DT_NS / (L_UH * 1000.0));
  localparam fp32_t K_DT_C = real_to_fp32(DT_NS / (C_UF * 1000.0));

  fp32_t il_q, vout_q;
  fp32_t vsel, vl, ic;
  fp32_t vl_op, ic_op;
  fp32_t il_next, vout_next;
  logic  il_neg, il_pos;
  logic  upd;

  // Sign of iL for the diode rule; -0 and +0 count as zero.
  assign il_neg = il_q[31]  && (il_q[30:0] != 31'd0);
  assign il_pos = !il_q[31] && (il_q[30:0] != 31'd0);

  branch_select u_branch (
    .sw     (sw),
    .il_neg (il_neg),
    .il_pos (il_pos),
    .dq     (dq)
  );

  vsrc_mux u_vsrc (
    .vg   (vg),
    .dq   (dq),
    .vsel (vsel)
  );

  fp32_addsub u_sub_vl (
    .a   (vsel),
    .b   (vout_q),
    .sub (1'b1),
    .y   (vl)
  );

  fp32_addsub u_sub_ic (
    .a   (il_q),
    .b   (ir),
    .sub (1'b1),
    .y   (ic)
  );

  generate
    if (PIPELINED) begin : g_pipe
      fp32_t vl_r, ic_r;
      logic  phase;
      always_ff @(posedge clk) begin
        if (rst) begin
          vl_r  <= FP32_ZERO;
          ic_r  <= FP32_ZERO;
          phase <= 1'b0;
        end else if (en) begin
          phase <= !phase;
          if (!phase) begin
            vl_r <= vl;
            ic_r <= ic;
          end
        end
      end
      assign vl_op = vl_r;
      assign ic_op = ic_r;
      assign upd   = en && phase;
    end else begin : g_comb
      assign vl_op = vl;
      assign ic_op = ic;
      assign upd   = en;
    end
  endgenerate

  fp32_mult_add u_mac_il (
    .a (K_DT_L),
    .b (vl_op),
    .c (il_q),
    .y (il_next)
  );

  fp32_mult_add u_mac_vout (
    .a (K_DT_C),
    .b (ic_op),
    .c (vout_q),
    .y (vout_next)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      il_q   <= FP32_ZERO;
      vout_q <= FP32_ZERO;
    end else if (upd) begin
      il_q   <= il_next;
      vout_q <= vout_next;
    end
  end

  assign il        = il_q;
  assign vout      = vout_q;
  assign step_done = upd;

endmodule
