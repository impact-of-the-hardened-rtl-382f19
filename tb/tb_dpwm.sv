// tb_dpwm: checks the bipolar DPWM with a short period (20 cycles).
// A counter in the testbench tracks the period; each cycle the switch
// pattern must be S1,S4 ON for the first duty cycles and S2,S3 ON for the
// rest, with a new duty taking effect only at the next period start.
// Also checks the period length (period_start every 20 cycles), the
// high-time per period, duty 0 and full duty, and that en = 0 freezes it.
module tb_dpwm;
  timeunit 1ns;
  timeprecision 1ps;
  import fb_pkg::*;

  localparam int P = 20;
  logic       clk = 1'b0, rst, en;
  logic [4:0] duty;
  sw_t        sw;
  logic       ps;
  int         checks = 0, failures = 0;

  dpwm #(.TSW_CYC(P)) dut (.clk(clk), .rst(rst), .en(en), .duty(duty), .sw(sw), .period_start(ps));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  initial begin
    int ph, cur_duty, hi_cnt, last_ps;
    int duties[6] = '{15, 5, 0, 20, 10, 1};
    rst = 1'b1; en = 1'b1; duty = 5'd15;
    @(posedge clk); @(negedge clk);
    rst = 1'b0;
    ph = 0; cur_duty = 15; hi_cnt = 0; last_ps = -1;
    for (int n = 0; n < 6 * P; n++) begin
      if (n > 0) @(negedge clk);
      if (ph == 0) cur_duty = (n == 0) ? 15 : duties[(n / P)];
      chk(ps == (ph == 0), "period_start position");
      chk(sw.s1 == (ph < cur_duty) && sw.s4 == (ph < cur_duty), "S1/S4 level");
      chk(sw.s2 == !(ph < cur_duty) && sw.s3 == !(ph < cur_duty), "S2/S3 level");
      chk(!(sw.s1 && sw.s3) && !(sw.s2 && sw.s4), "no leg shorted");
      if (sw.s1) hi_cnt++;
      // Change duty mid-period: must not act before the next period.
      if (ph == 3) duty = 5'(duties[(n / P + 1) % 6]);
      ph = ph + 1;
      if (ph == P) begin
        chk(hi_cnt == cur_duty, "high time per period");
        hi_cnt = 0;
        ph = 0;
      end
    end
    // en = 0 holds the switch pattern.
    @(negedge clk);
    en = 1'b0;
    begin
      sw_t held;
      held = sw;
      repeat (7) begin
        @(negedge clk);
        chk(sw == held, "frozen while disabled");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
