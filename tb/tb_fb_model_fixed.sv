// tb_fb_model_fixed: check of the fixed-point plant.
//
// Instance dut runs the default Q10.30 format with a 250 ns step under random
// legal switch patterns (diode cases included) and a 12 ohm load computed in
// the testbench. The testbench keeps its own integer copy of the state and
// advances it with the step constants rounded to 48 fraction bits and each
// product rounded to 30 fraction bits; states must match exactly. In
// parallel a double-precision model with the exact constants must stay within
// a small error of the hardware. Instance dsat uses only 7 integer bits
// (+-64) and is driven so that vout rings past 64 V: its state must saturate
// and the overflow flag must rise and stay set.
module tb_fb_model_fixed;
  timeunit 1ns;
  timeprecision 1ps;
  import fb_pkg::*;

  localparam real DT = 250.0, L = 900.0, C = 100.0, R = 12.0;
  localparam int  N  = 40000;
  localparam int  FW = 30, KF = 48;
  localparam real S  = 2.0 ** FW;

  logic               clk = 1'b0, rst, en;
  sw_t                sw, sw2;
  logic signed [39:0] vg, ir, il, vout;
  dq_t                dq;
  logic               ovf;
  logic signed [36:0] vg2, ir2, il2, vout2;
  dq_t                dq2;
  logic               ovf2;
  int                 checks = 0, failures = 0;
  int                 n_dq[4] = '{0, 0, 0, 0};
  int                 n_sat = 0;

  fb_model_fixed #(.DT_NS(DT), .L_UH(L), .C_UF(C)) dut (
    .clk(clk), .rst(rst), .en(en), .sw(sw), .vg(vg), .ir(ir),
    .il(il), .vout(vout), .dq(dq), .ovf(ovf));
  fb_model_fixed #(.DT_NS(DT), .L_UH(L), .C_UF(C), .IW(7)) dsat (
    .clk(clk), .rst(rst), .en(1'b1), .sw(sw2), .vg(vg2), .ir(ir2),
    .il(il2), .vout(vout2), .dq(dq2), .ovf(ovf2));

  always #5 clk = ~clk;

  initial begin
    repeat (N + 1000) @(posedge clk);
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

  // Round x / 2^KF to nearest (halves up) on wide integers.
  function automatic logic signed [127:0] rshift_round(input logic signed [127:0] x);
    return (x + (128'sd1 <<< (KF - 1))) >>> KF;
  endfunction

  initial begin
    logic signed [127:0] kl, kc, a_il, a_vo, vsel, n_il, n_vo;
    real   r_il, r_vo, r_vsel, t_il, max_err_i, max_err_v, e;
    logic  d, q;
    int    hold, legs;
    kl = 128'(longint'(DT / (L * 1000.0) * (2.0 ** KF)));
    kc = 128'(longint'(DT / (C * 1000.0) * (2.0 ** KF)));
    a_il = 0; a_vo = 0; r_il = 0.0; r_vo = 0.0; hold = 0;
    max_err_i = 0.0; max_err_v = 0.0;
    rst = 1'b1; en = 1'b1; sw = '0; vg = 40'(longint'(200.0 * S)); ir = '0;
    sw2 = '{s1: 1'b1, s2: 1'b0, s3: 1'b0, s4: 1'b1};
    vg2 = 37'(longint'(60.0 * S)); ir2 = '0;
    @(posedge clk); @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < N; n++) begin
      if (n > 0) @(negedge clk);
      if (hold == 0) begin
        legs = $urandom_range(8);
        sw.s1 = (legs % 3 == 0); sw.s3 = (legs % 3 == 1);
        sw.s2 = (legs / 3 == 0); sw.s4 = (legs / 3 == 1);
        hold = $urandom_range(1, 60);
      end
      hold--;
      en = ($urandom_range(19) != 0);
      // Load current from the reference state, rounded to the state format.
      ir = 40'(longint'(real'(a_vo) / S / R * S));
      #1;
      d = sw.s1 ? 1'b1 : (sw.s3 ? 1'b0 : (a_il < 0));
      q = sw.s2 ? 1'b1 : (sw.s4 ? 1'b0 : (a_il > 0));
      chk(dq == dq_t'({d, q}), "dq");
      n_dq[{d, q}]++;
      if (en) begin
        case ({d, q})
          2'b10:   begin vsel = 128'(vg);   r_vsel =  real'(vg) / S; end
          2'b01:   begin vsel = -128'(vg);  r_vsel = -real'(vg) / S; end
          default: begin vsel = 0;          r_vsel = 0.0;            end
        endcase
        n_il = a_il + rshift_round((vsel - a_vo) * kl);
        n_vo = a_vo + rshift_round((a_il - 128'(ir)) * kc);
        a_il = n_il; a_vo = n_vo;
        t_il = r_il;
        r_il = r_il + DT / (L * 1000.0) * (r_vsel - r_vo);
        r_vo = r_vo + DT / (C * 1000.0) * (t_il - real'(ir) / S);
      end
      @(posedge clk); #1;
      chk(128'(il) == a_il && 128'(vout) == a_vo, "states match integer reference");
      e = real'(il) / S - r_il;   if (e < 0.0) e = -e;  if (e > max_err_i) max_err_i = e;
      e = real'(vout) / S - r_vo; if (e < 0.0) e = -e;  if (e > max_err_v) max_err_v = e;
      chk(!ovf, "no overflow in the default format");
      if (ovf2 && (vout2 == 37'sh0F_FFFF_FFFF)) n_sat++;
    end
    $display("dq counts 00=%0d 01=%0d 10=%0d 11=%0d", n_dq[0], n_dq[1], n_dq[2], n_dq[3]);
    $display("max |error| vs real model: iL %e A, vout %e V; saturated cycles %0d", max_err_i, max_err_v, n_sat);
    chk(max_err_i < 1.0e-5 && max_err_v < 1.0e-5, "close to the real-valued model");
    chk(n_dq[0] > 0 && n_dq[1] > 0 && n_dq[2] > 0 && n_dq[3] > 0, "all four dq cases seen");
    chk(ovf2, "overflow flag raised in the narrow format");
    chk(n_sat > 0, "narrow vout saturated at its maximum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
