// tb_vsrc_mux: checks the dq-driven source selector with random input
// voltages: dq = 10 gives vg, 01 gives -vg, 00 and 11 give zero. Values are
// compared as reals after conversion, so the test does not depend on how the
// selector encodes the negation.
module tb_vsrc_mux;
  timeunit 1ns;
  timeprecision 1ps;
  import fb_pkg::*;
  import tb_fp_ref_pkg::*;

  logic [31:0] vg, vsel;
  dq_t         dq;
  int          checks = 0, failures = 0;

  vsrc_mux dut (.vg(vg), .dq(dq), .vsel(vsel));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, expv;
    for (int i = 0; i < 2000; i++) begin
      v  = ($urandom_range(400000) / 1000.0) - 200.0;
      vg = r2f(v);
      dq = dq_t'(2'(i));
      #1;
      case (i % 4)
        2:       expv = f2r(vg);
        1:       expv = -f2r(vg);
        default: expv = 0.0;
      endcase
      checks++;
      if (f2r(vsel) != expv) begin
        failures++;
        if (failures < 10) $display("MISMATCH dq=%b vg=%f vsel=%f expected %f", dq, f2r(vg), f2r(vsel), expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
