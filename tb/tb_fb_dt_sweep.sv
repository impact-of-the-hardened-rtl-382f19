// tb_fb_dt_sweep: integration step against accuracy, float32 and fixed point.
//
// Ten copies of the full set-up run the same 75 % start-up experiment
// (vg = 200 V, 12 ohm, Tsw = 50 us, from 0 V) with integration steps of
// 2.5, 5, 12.5, 50, 125, 500, 1250, 2500, 6250 and 12500 ns. All share one
// 2.5 ns master clock; the copy with step dt is enabled once every
// dt / 2.5 ns clocks, so all copies advance in the same converter time and
// their DPWM edges fall on the same instants. A double-precision model with
// a 1.25 ns step and ideal switching gives the reference. For each copy the
// mean absolute error of iL and vout over the run is printed. Each copy also
// carries the pipelined float32 plant, which steps on every second enable
// with twice the step; its errors are printed at its own update instants.
//
// Checked: the fixed-point error shrinks with every smaller step; the
// float32 error stops shrinking at short steps and is larger at 2.5 ns than
// at 12.5 ns (its 24-bit significand can no longer hold the per-step
// increments next to state values of hundreds of volts); at long steps the
// two arithmetics give the same error; every copy ends near 100 V. For the
// pipelined plant: half the steps; run with dt = 2.5 ns its error equals
// that of the single-cycle plant at 5 ns (same arithmetic); at steps of 50 ns
// and more its error is 1.5 to 2.5 times that of the single-cycle float32
// plant, as the doubled Euler step predicts. Where the 75 % switch-off edge
// comes after an odd number of cycles (dt = 500, 2500, 12500 ns), the
// pipelined plant, which samples the switches once per step, sees it one
// cycle late and its error is far larger.
module tb_fb_dt_sweep;
  timeunit 1ns;
  timeprecision 1ps;
  import fb_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int  NI = 10;
  localparam real DTS[NI] = '{2.5, 5.0, 12.5, 50.0, 125.0, 500.0, 1250.0, 2500.0, 6250.0, 12500.0};
  localparam int  RAT[NI] = '{1, 2, 5, 20, 50, 200, 500, 1000, 2500, 5000};
  localparam real T_END_NS = 20.0e6;     // 20 ms
  localparam int  NM = int'(T_END_NS / 2.5);
  localparam real S  = 2.0 ** 30;
  localparam real LH = 900.0e-6, CF = 100.0e-6, R = 12.0;

  logic               clk = 1'b0, rst;
  logic [NI-1:0]      en;
  fp32_t              il_fp[NI], vout_fp[NI];
  logic signed [39:0] il_fx[NI], vout_fx[NI];
  logic               ovf[NI];
  fp32_t              il_pp[NI], vout_pp[NI];
  logic [NI-1:0]      stp;
  int                 checks = 0, failures = 0;

  for (genvar i = 0; i < NI; i++) begin : g_dut
    localparam int TSWC = int'(50000.0 / DTS[i]);
    fp32_t              ir_fp_o;
    logic signed [39:0] ir_fx_o;
    sw_t                sw_o;
    dq_t                dq_fp_o, dq_fx_o, dq_pp_o;
    logic               ps_o;
    fb_hil_top #(.DT_NS(DTS[i])) u (
      .clk(clk), .rst(rst), .en(en[i]),
      .duty($clog2(TSWC + 1)'(TSWC * 3 / 4)),
      .sw_ext_en(1'b0), .sw_ext('0),
      .vg_fp(32'h4348_0000), .vg_fx(40'sd214748364800),
      .ir_ext_en(1'b0), .ir_ext_fp(32'h0), .ir_ext_fx(40'sd0),
      .sw(sw_o), .pwm_period_start(ps_o),
      .il_fp(il_fp[i]), .vout_fp(vout_fp[i]), .ir_fp(ir_fp_o), .dq_fp(dq_fp_o),
      .il_fx(il_fx[i]), .vout_fx(vout_fx[i]), .ir_fx(ir_fx_o), .dq_fx(dq_fx_o), .ovf_fx(ovf[i]),
      .il_fpp(il_pp[i]), .vout_fpp(vout_pp[i]), .dq_fpp(dq_pp_o), .step_fpp(stp[i]));
  end

  always #1.25 clk = ~clk;

  initial begin
    repeat (NM + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real ri, rv;
  // Reference: two 1.25 ns steps with ideal bipolar switching at 75 %.
  task automatic ref_step(input longint m);
    real h, vl, ri_old, t;
    h = 1.25e-9;
    for (int k = 0; k < 2; k++) begin
      t = real'(2 * m + k) * 1.25;                       // ns
      vl = ((t - 50000.0 * $floor(t / 50000.0)) < 37500.0) ? 200.0 - rv : -200.0 - rv;
      ri_old = ri;
      ri = ri + h / LH * vl;
      rv = rv + h / CF * (ri_old - rv / R);
    end
  endtask

  initial begin
    real mi_fp[NI], mv_fp[NI], mi_fx[NI], mv_fx[NI], mi_pp[NI], mv_pp[NI];
    int  cnt[NI], cnt_pp[NI];
    logic [NI-1:0] stp_q;
    for (int i = 0; i < NI; i++) begin
      mi_fp[i] = 0.0; mv_fp[i] = 0.0; mi_fx[i] = 0.0; mv_fx[i] = 0.0; cnt[i] = 0;
      mi_pp[i] = 0.0; mv_pp[i] = 0.0; cnt_pp[i] = 0;
    end
    ri = 0.0; rv = 0.0;
    rst = 1'b1; en = '0;
    @(posedge clk); @(negedge clk);
    rst = 1'b0;
    for (longint m = 0; m < NM; m++) begin
      if (m > 0) @(negedge clk);
      for (int i = 0; i < NI; i++) en[i] = ((m + 1) % RAT[i] == 0);
      ref_step(m);
      #0.1 stp_q = stp;
      @(posedge clk); #0.1;
      for (int i = 0; i < NI; i++) begin
        if (en[i]) begin
          mi_fp[i] += absr(f2r(il_fp[i]) - ri);
          mv_fp[i] += absr(f2r(vout_fp[i]) - rv);
          mi_fx[i] += absr(real'(il_fx[i]) / S - ri);
          mv_fx[i] += absr(real'(vout_fx[i]) / S - rv);
          cnt[i]++;
        end
        if (stp_q[i]) begin
          mi_pp[i] += absr(f2r(il_pp[i]) - ri);
          mv_pp[i] += absr(f2r(vout_pp[i]) - rv);
          cnt_pp[i]++;
        end
      end
    end
    $display("   dt(ns)  steps     |iL err| f32   |iL err| fix   |vout err| f32  |vout err| fix  vout_end");
    for (int i = 0; i < NI; i++) begin
      mi_fp[i] /= cnt[i]; mv_fp[i] /= cnt[i]; mi_fx[i] /= cnt[i]; mv_fx[i] /= cnt[i];
      $display("%9.1f %8d  %e   %e   %e   %e   %0.2f", DTS[i], cnt[i], mi_fp[i], mi_fx[i], mv_fp[i], mv_fx[i],
               real'(vout_fx[i]) / S);
      chk(cnt[i] == int'(T_END_NS / DTS[i]), "step count equals run time / dt");
      chk(!ovf[i], "no fixed-point overflow");
      chk(absr(real'(vout_fx[i]) / S - 100.0) < 15.0, "ends near 100 V");
    end
    $display("   pipelined float32 plant (step 2*dt):");
    $display("   dt(ns)  steps     |iL err| pip   |vout err| pip  ratio iL to f32");
    for (int i = 0; i < NI; i++) begin
      mi_pp[i] /= cnt_pp[i]; mv_pp[i] /= cnt_pp[i];
      $display("%9.1f %8d  %e   %e   %0.2f", 2.0 * DTS[i], cnt_pp[i], mi_pp[i], mv_pp[i], mi_pp[i] / mi_fp[i]);
      chk(cnt_pp[i] == cnt[i] / 2, "pipelined plant makes half the steps");
      // Switch-off edge after an odd number of cycles: it falls between two
      // samples of the pipelined plant and is moved by one cycle.
      if (i >= 3 && (int'(50000.0 / DTS[i]) * 3 / 4) % 2 == 0)
        chk(mi_pp[i] > 1.5 * mi_fp[i] && mi_pp[i] < 2.5 * mi_fp[i], "pipelined error follows the doubled step");
      if (i >= 3 && (int'(50000.0 / DTS[i]) * 3 / 4) % 2 == 1)
        chk(mi_pp[i] > 5.0 * mi_fp[i], "pipelined plant sees the duty moved by one cycle");
    end
    // Same 5 ns step, same arithmetic, same switching: same error.
    chk(absr(mi_pp[0] - mi_fp[1]) < 1.0e-6 * mi_fp[1], "pipelined plant at 2.5 ns equals single-cycle plant at 5 ns");
    for (int i = 0; i + 1 < NI; i++)
      chk(mi_fx[i] < mi_fx[i + 1] && mv_fx[i] < mv_fx[i + 1], "fixed-point error falls with the step");
    chk(mi_fp[0] > mi_fp[2] && mv_fp[0] > mv_fp[2], "float32 error grows again below 12.5 ns");
    chk(mi_fp[0] > 4.0 * mi_fx[0], "float32 well behind fixed point at 2.5 ns");
    for (int i = 5; i < NI; i++)
      chk(absr(mi_fp[i] - mi_fx[i]) < 0.1 * mi_fx[i], "float32 and fixed point agree at long steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
