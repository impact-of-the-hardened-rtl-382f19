// tb_branch_select: exhaustive test of the branch-selection rule.
// All 16 switch combinations are tried with iL negative, zero and positive;
// the expected d and q are written out as the conduction cases of the bridge:
// upper-left switch closed, or both left switches open with the current
// returning through the upper-left diode (iL < 0); likewise on the right for
// iL > 0.
module tb_branch_select;
  timeunit 1ns;
  timeprecision 1ps;
  import fb_pkg::*;

  sw_t  sw;
  logic il_neg, il_pos;
  dq_t  dq;
  int   checks = 0, failures = 0;

  branch_select dut (.sw(sw), .il_neg(il_neg), .il_pos(il_pos), .dq(dq));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_d, exp_q;
    for (int s = 0; s < 16; s++) begin
      for (int sg = -1; sg <= 1; sg++) begin
        sw     = sw_t'(4'(s));
        il_neg = (sg < 0);
        il_pos = (sg > 0);
        #1;
        // Left leg.
        if (sw.s1)                    exp_d = 1'b1;  // S1 closed
        else if (sw.s3)               exp_d = 1'b0;  // S3 closed
        else                          exp_d = (sg < 0);  // D1 conducts for iL < 0
        // Right leg.
        if (sw.s2)                    exp_q = 1'b1;
        else if (sw.s4)               exp_q = 1'b0;
        else                          exp_q = (sg > 0);  // D2 conducts for iL > 0
        checks++;
        if (dq !== dq_t'({exp_d, exp_q})) begin
          failures++;
          $display("MISMATCH sw=%b sign=%0d dq=%b expected %b%b", s, sg, dq, exp_d, exp_q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
