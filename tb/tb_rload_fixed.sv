// tb_rload_fixed: checks iR = vout / R in the Q10.30 state format for random
// voltages. The result must be the exact quotient vout / R, computed on
// reals, rounded to the nearest LSB: allowed error half an LSB for the
// rounding plus a quarter LSB for the quantisation of 1/R (40 fraction bits,
// |vout| < 256 V).
module tb_rload_fixed;
  timeunit 1ns;
  timeprecision 1ps;
  localparam real R  = 12.0;
  localparam int  FW = 30;
  logic signed [39:0] vout, ir;
  int                 checks = 0, failures = 0;

  rload_fixed #(.R_OHM(R)) dut (.vout(vout), .ir(ir));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, expi, got, tol;
    tol = 0.75 / (2.0 ** FW);
    for (int i = 0; i < 3000; i++) begin
      vout = {$urandom, 8'($urandom)};
      vout = vout >>> 1;   // keep |vout| < 256 V
      #1;
      v    = real'(vout) / (2.0 ** FW);
      expi = v / R;
      got  = real'(ir) / (2.0 ** FW);
      checks++;
      if (got - expi > tol || expi - got > tol) begin
        failures++;
        if (failures < 10) $display("MISMATCH vout=%f ir=%f expected %f", v, got, expi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
