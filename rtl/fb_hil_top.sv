// fb_hil_top: full-bridge converter hardware-in-the-loop set-up.
//
// Runs the converter plant in real time, one integration step per clock
// (dt = DT_NS, 12.5 ns by default), in two arithmetics side by side so their
// results can be compared cycle by cycle:
//   - fb_model_fp32 : IEEE 754 single precision, the datapath the hardened
//                     floating-point DSP blocks implement,
//   - fb_model_fixed: signed fixed point (Q10.30 states by default),
// plus the pipelined float32 plant, which needs two clocks per step and so
// runs with a step of 2*DT_NS to stay in real time (outputs *_fpp).
// All plants see the same switch commands. These come from the built-in
// bipolar DPWM (period TSW_NS = 50 us, duty given in clock cycles), or, with
// sw_ext_en = 1, straight from the sw_ext input, so that any modulation, dead
// time or all-switches-off interval can be applied. Each plant is closed by
// a resistive load (R_OHM = 12 ohm) computing iR from its own vout; with
// ir_ext_en = 1 the load currents of the two single-cycle plants come from
// ir_ext_fp / ir_ext_fx instead (the pipelined plant keeps its own load),
// so that load steps or any other load can be applied from outside.
// The converter values L = 900 uH, C = 100 uF, R = 12 ohm, Tsw = 50 us are
// the reference test set; the default step is its fixed-point clock period.
//
// vg is given twice, once per arithmetic (vg_fp as a float32 word, vg_fx in
// the fixed-point state format). Everything is synchronous to clk with an
// active-high synchronous reset that zeroes all three plants (converter off);
// en = 0 freezes the DPWM and all plants.
module fb_hil_top
  import fb_pkg::*;
#(
  parameter real DT_NS  = 12.5,
  parameter real L_UH   = 900.0,
  parameter real C_UF   = 100.0,
  parameter real R_OHM  = 12.0,
  parameter real TSW_NS = 50000.0,
  localparam int TSW_CYC = int'(TSW_NS / DT_NS),
  localparam int DCW     = $clog2(TSW_CYC + 1),
  localparam int W       = FX_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [DCW-1:0]      duty,
  input  logic                sw_ext_en,
  input  sw_t                 sw_ext,
  input  fp32_t               vg_fp,
  input  logic signed [W-1:0] vg_fx,
  input  logic                ir_ext_en,
  input  fp32_t               ir_ext_fp,
  input  logic signed [W-1:0] ir_ext_fx,
  output sw_t                 sw,
  output logic                pwm_period_start,
  output fp32_t               il_fp,
  output fp32_t               vout_fp,
  output fp32_t               ir_fp,
  output dq_t                 dq_fp,
  output logic signed [W-1:0] il_fx,
  output logic signed [W-1:0] vout_fx,
  output logic signed [W-1:0] ir_fx,
  output dq_t                 dq_fx,
  output logic                ovf_fx,
  output fp32_t               il_fpp,
  output fp32_t               vout_fpp,
  output dq_t                 dq_fpp,
  output logic                step_fpp
);

  sw_t                 sw_pwm;
  fp32_t               ir_load_fp;
  logic signed [W-1:0] ir_load_fx;

  dpwm #(
    .TSW_CYC (TSW_CYC)
  ) u_dpwm (
    .clk          (clk),
    .rst          (rst),
    .en           (en),
    .duty         (duty),
    .sw           (sw_pwm),
    .period_start (pwm_period_start)
  );

  assign sw = sw_ext_en ? sw_ext : sw_pwm;

  // Single-precision plant and its load.
  logic step_done_fp;

  fb_model_fp32 #(
    .DT_NS     (DT_NS),
    .L_UH      (L_UH),
    .C_UF      (C_UF),
    .PIPELINED (1'b0)
  ) u_model_fp (
    .clk       (clk),
    .rst       (rst),
    .en        (en),
    .sw        (sw),
    .vg        (vg_fp),
    .ir        (ir_fp),
    .il        (il_fp),
    .vout      (vout_fp),
    .dq        (dq_fp),
    .step_done (step_done_fp)
  );

  rload_fp32 #(
    .R_OHM (R_OHM)
  ) u_load_fp (
    .vout (vout_fp),
    .ir   (ir_load_fp)
  );

  assign ir_fp = ir_ext_en ? ir_ext_fp : ir_load_fp;

  // Pipelined single-precision plant: one step every second clock.
  fp32_t ir_fpp;

  fb_model_fp32 #(
    .DT_NS     (2.0 * DT_NS),
    .L_UH      (L_UH),
    .C_UF      (C_UF),
    .PIPELINED (1'b1)
  ) u_model_fpp (
    .clk       (clk),
    .rst       (rst),
    .en        (en),
    .sw        (sw),
    .vg        (vg_fp),
    .ir        (ir_fpp),
    .il        (il_fpp),
    .vout      (vout_fpp),
    .dq        (dq_fpp),
    .step_done (step_fpp)
  );

  rload_fp32 #(
    .R_OHM (R_OHM)
  ) u_load_fpp (
    .vout (vout_fpp),
    .ir   (ir_fpp)
  );

  // Fixed-point plant and its load.
  fb_model_fixed #(
    .DT_NS (DT_NS),
    .L_UH  (L_UH),
    .C_UF  (C_UF)
  ) u_model_fx (
    .clk  (clk),
    .rst  (rst),
    .en   (en),
    .sw   (sw),
    .vg   (vg_fx),
    .ir   (ir_fx),
    .il   (il_fx),
    .vout (vout_fx),
    .dq   (dq_fx),
    .ovf  (ovf_fx)
  );

  rload_fixed #(
    .R_OHM (R_OHM)
  ) u_load_fx (
    .vout (vout_fx),
    .ir   (ir_load_fx)
  );

  assign ir_fx = ir_ext_en ? ir_ext_fx : ir_load_fx;

  // In the non-pipelined plant every enabled clock is an integration step.
  always_ff @(posedge clk) begin
    if (!rst) assert (step_done_fp == en)
      else $error("float32 plant skipped an integration step");
  end

endmodule
