// tb_fb_model_fp32: bit-exact check of the float32 plant, both variants.
//
// Two instances run side by side on the same inputs: the default
// single-cycle model and the pipelined one. The testbench keeps its own copy
// of each plant's state and advances it with reference float32 arithmetic
// (operations on reals, rounded to single precision after every operation):
//   vL = vsel - vout, iC = iL - iR, iL += fl(dt/L * vL), vout += fl(dt/C * iC)
// with vsel chosen by its own coding of the branch rule. Switch patterns are
// random legal bridge states (no leg shorted), including both switches of a
// leg open so that the diode cases occur; iR comes from a 12 ohm load on the
// reference vout. A larger step (250 ns) makes the states move quickly.
// Checked every cycle: both states of both instances, dq, and that the
// pipelined model updates exactly every second clock (rate 1/2).
module tb_fb_model_fp32;
  timeunit 1ns;
  timeprecision 1ps;
  import fb_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam real DT = 250.0, L = 900.0, C = 100.0, R = 12.0;
  localparam int  N  = 40000;

  logic  clk = 1'b0, rst, en;
  sw_t   sw;
  fp32_t vg, ir;
  fp32_t il0, vo0, il1, vo1;
  dq_t   dq0, dq1;
  logic  sd0, sd1;
  int    checks = 0, failures = 0;
  int    n_dq[4] = '{0, 0, 0, 0};
  int    n_diode_d = 0, n_diode_q = 0;

  fb_model_fp32 #(.DT_NS(DT), .L_UH(L), .C_UF(C), .PIPELINED(1'b0)) dut0 (
    .clk(clk), .rst(rst), .en(en), .sw(sw), .vg(vg), .ir(ir),
    .il(il0), .vout(vo0), .dq(dq0), .step_done(sd0));
  fb_model_fp32 #(.DT_NS(DT), .L_UH(L), .C_UF(C), .PIPELINED(1'b1)) dut1 (
    .clk(clk), .rst(rst), .en(en), .sw(sw), .vg(vg), .ir(ir),
    .il(il1), .vout(vo1), .dq(dq1), .step_done(sd1));

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
      if (failures < 10) $display("FAIL %s at cycle %0t", what, $time);
    end
  endtask

  function automatic logic [1:0] ref_dq(input sw_t s, input logic [31:0] il);
    logic d, q;
    d = s.s1 ? 1'b1 : (s.s3 ? 1'b0 : (f2r(il) < 0.0));
    q = s.s2 ? 1'b1 : (s.s4 ? 1'b0 : (f2r(il) > 0.0));
    return {d, q};
  endfunction

  function automatic logic [31:0] ref_vsel(input logic [1:0] code, input logic [31:0] v);
    if (code == 2'b10) return v;
    if (code == 2'b01) return r2f(-f2r(v));
    return 32'h0;
  endfunction

  initial begin
    logic [31:0] kl, kc, g;
    logic [31:0] il_a, vo_a, il_b, vo_b, vl_b, ic_b, il_n, vo_n;
    logic [1:0]  code_a, code_b;
    logic        phase;
    int          hold, last_upd, legs;
    kl = r2f(DT * 1.0e-9 / (L * 1.0e-6));
    kc = r2f(DT * 1.0e-9 / (C * 1.0e-6));
    g  = r2f(1.0 / R);
    il_a = 0; vo_a = 0; il_b = 0; vo_b = 0; vl_b = 0; ic_b = 0;
    phase = 1'b0; hold = 0; last_upd = -1;
    rst = 1'b1; en = 1'b1; sw = '0; vg = r2f(200.0); ir = 0;
    @(posedge clk); @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < N; n++) begin
      if (n > 0) @(negedge clk);
      if (hold == 0) begin
        legs = $urandom_range(8);
        // left leg: 0 S1 on, 1 S3 on, 2 both off; right leg likewise S2/S4
        sw.s1 = (legs % 3 == 0); sw.s3 = (legs % 3 == 1);
        sw.s2 = (legs / 3 == 0); sw.s4 = (legs / 3 == 1);
        hold = $urandom_range(1, 60);
        if ($urandom_range(9) == 0) vg = r2f(real'($urandom_range(250)));
      end
      hold--;
      en = ($urandom_range(19) != 0);
      ir = mul_ref(vo_a, g);
      #1;
      code_a = ref_dq(sw, il_a);
      chk(dq0 == dq_t'(code_a), "dq of single-cycle model");
      n_dq[code_a]++;
      if (!sw.s1 && !sw.s3 && code_a[1]) n_diode_d++;
      if (!sw.s2 && !sw.s4 && code_a[0]) n_diode_q++;
      chk(sd0 == en, "single-cycle model updates on every enabled clock");
      chk(sd1 == (en && phase), "pipelined model updates every second clock");
      // Single-cycle reference step.
      if (en) begin
        il_n = add_ref(mul_ref(kl, sub_ref(ref_vsel(code_a, vg), vo_a)), il_a);
        vo_n = add_ref(mul_ref(kc, sub_ref(il_a, ir)), vo_a);
        il_a = il_n; vo_a = vo_n;
      end
      // Pipelined reference step.
      if (en) begin
        if (!phase) begin
          code_b = ref_dq(sw, il_b);
          vl_b = sub_ref(ref_vsel(code_b, vg), vo_b);
          ic_b = sub_ref(il_b, ir);
        end else begin
          if (last_upd >= 0) chk(n - last_upd >= 2, "pipelined update spacing");
          last_upd = n;
          il_b = add_ref(mul_ref(kl, vl_b), il_b);
          vo_b = add_ref(mul_ref(kc, ic_b), vo_b);
        end
        phase = !phase;
      end
      @(posedge clk); #1;
      chk(il0 === il_a && vo0 === vo_a, "single-cycle model states");
      chk(il1 === il_b && vo1 === vo_b, "pipelined model states");
      if (failures > 0 && failures < 3)
        $display("  cycle %0d: il0=%f ref %f vo0=%f ref %f il1=%f ref %f", n,
                 f2r(il0), f2r(il_a), f2r(vo0), f2r(vo_a), f2r(il1), f2r(il_b));
    end
    $display("dq counts 00=%0d 01=%0d 10=%0d 11=%0d, diode d=%0d q=%0d", n_dq[0], n_dq[1], n_dq[2], n_dq[3],
             n_diode_d, n_diode_q);
    $display("final iL=%f A vout=%f V", f2r(il0), f2r(vo0));
    chk(n_dq[0] > 0 && n_dq[1] > 0 && n_dq[2] > 0 && n_dq[3] > 0, "all four dq cases seen");
    chk(n_diode_d > 0 && n_diode_q > 0, "both diode cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
