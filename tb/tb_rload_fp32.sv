// tb_rload_fp32: checks iR = vout / R in single precision for random output
// voltages against the correctly rounded product vout * fl(1/R) computed on
// reals, and against the exact quotient within one part in 10^6.
module tb_rload_fp32;
  timeunit 1ns;
  timeprecision 1ps;
  import tb_fp_ref_pkg::*;

  localparam real R = 12.0;
  logic [31:0] vout, ir;
  int          checks = 0, failures = 0;

  rload_fp32 #(.R_OHM(R)) dut (.vout(vout), .ir(ir));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, err;
    logic [31:0] g;
    g = r2f(1.0 / R);
    for (int i = 0; i < 3000; i++) begin
      v    = ($urandom_range(600000) / 1000.0) - 300.0;
      vout = r2f(v);
      #1;
      checks++;
      if (ir !== mul_ref(vout, g)) begin
        failures++;
        if (failures < 10) $display("MISMATCH vout=%f ir=%h expected %h", v, ir, mul_ref(vout, g));
      end
      checks++;
      err = f2r(ir) - f2r(vout) / R;
      if (err < 0.0) err = -err;
      if (err > 1.0e-6 * (1.0 + (v < 0.0 ? -v : v) / R)) begin
        failures++;
        if (failures < 10) $display("OFF vout=%f ir=%f", v, f2r(ir));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
