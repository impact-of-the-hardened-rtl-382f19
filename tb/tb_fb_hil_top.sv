// tb_fb_hil_top: end-to-end test of the full-bridge HIL set-up at its
// default parameters (dt = 12.5 ns, L = 900 uH, C = 100 uF, R = 12 ohm,
// Tsw = 50 us).
//
// Phase 1, start-up: from the off state (vout = 0 V) the DPWM is set to a
// 75 % duty cycle with vg = 200 V, and 20 ms of converter time
// (1.6 million clocks) are simulated. Alongside, the testbench integrates the
// same converter on reals with a 1.25 ns step (ten sub-steps per clock),
// using the switch commands the DPWM produced. Checked: the mean absolute
// error of iL and vout of both hardware plants against that reference, the
// agreement of the two single-cycle plants with each other, and the steady state reached
// in the last switching period (vout close to (2*0.75-1)*200 V = 100 V,
// iL close to vout/R).
//
// The pipelined float32 plant, stepping every second clock with a 25 ns
// step, is compared with the reference at its own update instants.
//
// Phase 1b, load step: the built-in 12 ohm loads are replaced through the
// external load-current inputs by 6 ohm loads computed in the testbench from
// each plant's own vout, for 10 ms; the mean iL must settle at vout/6.
// Phase 1c, input-voltage step and duty change: vg drops to 150 V, the duty
// to 70 % and the built-in load returns, for 10 ms; vout must settle at
// (2*0.70-1)*150 V = 60 V within 1 V (the step still rings slightly after
// 10 ms) and its mean iL must match the reference. The reference follows
// all three phases.
//
// Phase 2, external switching: the DPWM is bypassed (sw_ext_en = 1) and
// the bridge is freewheeled through S3/S4 (dq = 00), then through S1/S2
// (dq = 11), then all switches are opened so that the current returns through
// the diodes (dq set by the sign of iL). Then en = 0 must freeze everything.
//
// Every mechanism (each dq code, each diode case, the DPWM/external switch
// change-over, the freeze) is counted, and one that never happened counts
// as a failure. The fixed-point overflow flag must never rise.
module tb_fb_hil_top;
  timeunit 1ns;
  timeprecision 1ps;
  import fb_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam real DT   = 12.5;          // ns, default step of the top
  localparam real LH   = 900.0e-6;
  localparam real CF   = 100.0e-6;
  localparam real R    = 12.0;
  localparam int  TSW  = 4000;          // clocks per switching period
  localparam int  N1   = 1_600_000;     // 20 ms
  localparam int  N2   = 800_000;       // 10 ms
  localparam int  NSUB = 10;            // reference sub-steps per clock
  localparam real S    = 2.0 ** 30;

  logic               clk = 1'b0, rst, en;
  logic [11:0]        duty;
  logic               sw_ext_en;
  sw_t                sw_ext, sw;
  fp32_t              vg_fp, il_fp, vout_fp, ir_fp, ir_ext_fp;
  logic               ir_ext_en;
  logic signed [39:0] ir_ext_fx;
  logic signed [39:0] vg_fx, il_fx, vout_fx, ir_fx;
  dq_t                dq_fp, dq_fx;
  logic               ovf_fx, ps;
  fp32_t              il_fpp, vout_fpp;
  dq_t                dq_fpp;
  logic               step_fpp;
  int                 n_fpp = 0;
  int                 checks = 0, failures = 0;
  int                 n_dq[4] = '{0, 0, 0, 0};
  int                 n_diode_d = 0, n_diode_q = 0, n_ext = 0, n_pwm = 0, n_frozen = 0, n_periods = 0;
  int                 n_ir_ext = 0, n_vg_step = 0;

  fb_hil_top dut (
    .clk(clk), .rst(rst), .en(en), .duty(duty), .sw_ext_en(sw_ext_en), .sw_ext(sw_ext),
    .vg_fp(vg_fp), .vg_fx(vg_fx), .ir_ext_en(ir_ext_en), .ir_ext_fp(ir_ext_fp), .ir_ext_fx(ir_ext_fx), .sw(sw), .pwm_period_start(ps),
    .il_fp(il_fp), .vout_fp(vout_fp), .ir_fp(ir_fp), .dq_fp(dq_fp),
    .il_fx(il_fx), .vout_fx(vout_fx), .ir_fx(ir_fx), .dq_fx(dq_fx), .ovf_fx(ovf_fx),
    .il_fpp(il_fpp), .vout_fpp(vout_fpp), .dq_fpp(dq_fpp), .step_fpp(step_fpp));

  always #6.25 clk = ~clk;

  initial begin
    repeat (N1 + 2 * N2 + 60_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic real fx(input logic signed [39:0] v);
    return real'(v) / S;
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Reference state and its integration over one clock.
  real ri, rv;
  task automatic ref_step(input sw_t s, input real vg, input real rl);
    real h, vl, ri_old;
    logic d, q;
    h = DT * 1.0e-9 / NSUB;
    for (int k = 0; k < NSUB; k++) begin
      d = s.s1 || (!s.s1 && !s.s3 && ri < 0.0);
      q = s.s2 || (!s.s2 && !s.s4 && ri > 0.0);
      if (d && !q)      vl = vg - rv;
      else if (!d && q) vl = -vg - rv;
      else              vl = -rv;
      ri_old = ri;
      ri = ri + h / LH * vl;
      rv = rv + h / CF * (ri_old - rv / rl);
    end
  endtask

  // Counts the dq code and the diode cases seen this cycle.
  task automatic count_dq();
    n_dq[dq_fp]++;
    if (!sw.s1 && !sw.s3 && dq_fp[1]) n_diode_d++;
    if (!sw.s2 && !sw.s4 && dq_fp[0]) n_diode_q++;
    chk(dq_fp == dq_fx || absr(f2r(il_fp)) < 0.05, "both plants pick the same branches");
  endtask

  initial begin
    real mae_i_fp, mae_v_fp, mae_i_fx, mae_v_fx, d_fp_fx, mae_i_pp, mae_v_pp;
    logic upd_pp;
    real sum_v, sum_i, max_v, sum_ri;
    sw_t held_sw;
    fp32_t held_il;
    logic signed [39:0] held_v;

    ri = 0.0; rv = 0.0;
    mae_i_pp = 0.0; mae_v_pp = 0.0;
    mae_i_fp = 0.0; mae_v_fp = 0.0; mae_i_fx = 0.0; mae_v_fx = 0.0; d_fp_fx = 0.0;
    sum_v = 0.0; sum_i = 0.0; max_v = 0.0;
    rst = 1'b1; en = 1'b1; duty = 12'(TSW * 3 / 4); sw_ext_en = 1'b0; sw_ext = '0;
    ir_ext_en = 1'b0; ir_ext_fp = '0; ir_ext_fx = '0;
    vg_fp = r2f(200.0); vg_fx = 40'(longint'(200.0 * S));
    @(posedge clk); @(negedge clk);
    rst = 1'b0;

    // ---- Phase 1: start-up transient under the DPWM, 20 ms.
    for (int n = 0; n < N1; n++) begin
      if (n > 0) @(negedge clk);
      count_dq();
      n_pwm++;
      if (ps) n_periods++;
      ref_step(sw, 200.0, R);
      upd_pp = step_fpp;
      if (upd_pp) n_fpp++;
      chk(step_fpp == (n % 2 == 1), "pipelined plant steps on every second clock");
      @(posedge clk); #1;
      if (upd_pp) begin
        mae_i_pp += absr(f2r(il_fpp) - ri);
        mae_v_pp += absr(f2r(vout_fpp) - rv);
      end
      mae_i_fp += absr(f2r(il_fp) - ri);
      mae_v_fp += absr(f2r(vout_fp) - rv);
      mae_i_fx += absr(fx(il_fx) - ri);
      mae_v_fx += absr(fx(vout_fx) - rv);
      if (absr(f2r(vout_fp) - fx(vout_fx)) > d_fp_fx) d_fp_fx = absr(f2r(vout_fp) - fx(vout_fx));
      if (f2r(vout_fp) > max_v) max_v = f2r(vout_fp);
      if (n >= N1 - TSW) begin
        sum_v += fx(vout_fx);
        sum_i += fx(il_fx);
      end
    end
    mae_i_fp /= N1; mae_v_fp /= N1; mae_i_fx /= N1; mae_v_fx /= N1;
    $display("start-up: peak vout %0.2f V, last-period mean vout %0.3f V, iL %0.3f A; switching periods %0d",
             max_v, sum_v / TSW, sum_i / TSW, n_periods);
    $display("mean |error| vs 1.25 ns real reference: float32 iL %e A vout %e V; fixed iL %e A vout %e V",
             mae_i_fp, mae_v_fp, mae_i_fx, mae_v_fx);
    $display("largest float32/fixed vout difference %e V", d_fp_fx);
    mae_i_pp /= n_fpp; mae_v_pp /= n_fpp;
    $display("pipelined float32 plant (25 ns step): %0d steps, mean |error| iL %e A vout %e V",
             n_fpp, mae_i_pp, mae_v_pp);
    chk(n_fpp == N1 / 2, "pipelined plant made one step per two clocks");
    chk(mae_i_pp < 1.0e-2 && mae_v_pp < 1.0e-2, "pipelined float32 error small");
    chk(mae_i_pp > mae_i_fx, "pipelined plant (twice the step) less accurate than the fixed-point one");
    chk(n_periods == N1 / TSW, "one DPWM period per 4000 steps (50 us at 12.5 ns)");
    chk(absr(sum_v / TSW - 100.0) < 1.0, "steady-state vout near 100 V");
    chk(absr(sum_i / TSW - sum_v / TSW / R) < 0.1, "steady-state iL equals the load current");
    chk(max_v > 120.0, "start-up overshoot present");
    chk(mae_i_fx < 2.0e-3 && mae_v_fx < 2.0e-3, "fixed-point error small");
    chk(mae_i_fp < 1.0e-2 && mae_v_fp < 1.0e-2, "float32 error small");
    chk(d_fp_fx < 0.1, "float32 and fixed-point plants agree");

    // ---- Phase 1b: load step to 6 ohm through the external load inputs.
    ir_ext_en = 1'b1;
    sum_v = 0.0; sum_i = 0.0; mae_i_fx = 0.0; mae_i_fp = 0.0;
    for (int n = 0; n < N2; n++) begin
      @(negedge clk);
      ir_ext_fp = r2f(f2r(vout_fp) / 6.0);
      ir_ext_fx = 40'(longint'(fx(vout_fx) / 6.0 * S));
      #1;
      chk(ir_fp == ir_ext_fp && ir_fx == ir_ext_fx, "external load current reaches the plants");
      n_ir_ext++;
      count_dq();
      ref_step(sw, 200.0, 6.0);
      @(posedge clk); #1;
      mae_i_fp += absr(f2r(il_fp) - ri);
      mae_i_fx += absr(fx(il_fx) - ri);
      if (n >= N2 - TSW) begin
        sum_v += fx(vout_fx);
        sum_i += fx(il_fx);
      end
    end
    $display("load step: last-period mean vout %0.3f V, iL %0.3f A; mean |iL error| float32 %e fixed %e",
             sum_v / TSW, sum_i / TSW, mae_i_fp / N2, mae_i_fx / N2);
    chk(absr(sum_v / TSW - 100.0) < 1.0, "vout stays near 100 V after the load step");
    chk(absr(sum_i / TSW - sum_v / TSW / 6.0) < 0.2, "iL settles at the new load current");
    chk(mae_i_fx / N2 < 2.0e-3 && mae_i_fp / N2 < 1.0e-2, "plants follow the reference through the load step");

    // ---- Phase 1c: vg 200 -> 150 V, duty 75 -> 70 %, built-in load again.
    ir_ext_en = 1'b0;
    vg_fp = r2f(150.0); vg_fx = 40'(longint'(150.0 * S));
    duty = 12'(TSW * 7 / 10);
    sum_v = 0.0; sum_i = 0.0; sum_ri = 0.0; mae_v_fx = 0.0; mae_v_fp = 0.0;
    for (int n = 0; n < N2; n++) begin
      @(negedge clk);
      count_dq();
      n_vg_step++;
      ref_step(sw, 150.0, R);
      @(posedge clk); #1;
      mae_v_fp += absr(f2r(vout_fp) - rv);
      mae_v_fx += absr(fx(vout_fx) - rv);
      if (n >= N2 - TSW) begin
        sum_v += fx(vout_fx);
        sum_i += fx(il_fx);
        sum_ri += ri;
      end
    end
    $display("vg/duty step: last-period mean vout %0.3f V, iL %0.3f A; mean |vout error| float32 %e fixed %e",
             sum_v / TSW, sum_i / TSW, mae_v_fp / N2, mae_v_fx / N2);
    chk(absr(sum_v / TSW - 60.0) < 1.0, "vout settles near 60 V after the vg and duty step");
    chk(absr(sum_i - sum_ri) / TSW < 0.01, "last-period mean iL matches the reference");
    chk(mae_v_fx / N2 < 2.0e-3 && mae_v_fp / N2 < 1.0e-2, "plants follow the reference through the vg step");

    // ---- Phase 2: external switch commands.
    sw_ext_en = 1'b1;
    for (int n = 0; n < 45_000; n++) begin
      @(negedge clk);
      if (n < 3000)       sw_ext = '{s1: 1'b0, s2: 1'b0, s3: 1'b1, s4: 1'b1};  // dq = 00
      else if (n < 6000)  sw_ext = '{s1: 1'b1, s2: 1'b1, s3: 1'b0, s4: 1'b0};  // dq = 11
      else if (n < 20000) sw_ext = '0;                                          // diodes
      else if (n < 22000) sw_ext = '{s1: 1'b0, s2: 1'b1, s3: 1'b1, s4: 1'b0};  // reverse
      else                sw_ext = '0;                                          // diodes
      #1;
      chk(sw == sw_ext, "external switch commands reach the plants");
      n_ext++;
      count_dq();
      @(posedge clk); #1;
      chk(absr(f2r(vout_fp) - fx(vout_fx)) < 0.5, "plants agree under external switching");
    end

    // ---- Freeze.
    @(negedge clk);
    en = 1'b0;
    held_sw = sw; held_il = il_fp; held_v = vout_fx;
    repeat (100) begin
      @(posedge clk); #1;
      if (il_fp == held_il && vout_fx == held_v && sw == held_sw) n_frozen++;
    end
    chk(n_frozen == 100, "en = 0 freezes the plants");
    chk(!ovf_fx, "no fixed-point overflow");

    $display("mechanisms: dq00=%0d dq01=%0d dq10=%0d dq11=%0d diode_d=%0d diode_q=%0d pwm_cycles=%0d ext_cycles=%0d frozen=%0d ir_ext=%0d vg_step=%0d",
             n_dq[0], n_dq[1], n_dq[2], n_dq[3], n_diode_d, n_diode_q, n_pwm, n_ext, n_frozen, n_ir_ext, n_vg_step);
    chk(n_dq[0] > 0, "dq = 00 happened");
    chk(n_dq[1] > 0, "dq = 01 happened");
    chk(n_dq[2] > 0, "dq = 10 happened");
    chk(n_dq[3] > 0, "dq = 11 happened");
    chk(n_diode_d > 0, "conduction through D1 happened");
    chk(n_diode_q > 0, "conduction through D2 happened");
    chk(n_pwm > 0 && n_ext > 0, "DPWM and external switching both used");
    chk(n_ir_ext > 0, "external load current used");
    chk(n_vg_step > 0, "input-voltage step applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
