// rload_fp32: resistive load of the converter, single precision.
//
// Closes the model's iR input for the reference design's resistive load:
// iR = vout * (1/R), with 1/R fixed at elaboration from R_OHM (12 ohm by
// default). One float32 multiplier, combinational; in the full set-up its
// input is the registered vout, so iR is the load current of the previous
// step. Writing the load as a conductance multiply is this design's choice.
module rload_fp32
  import fb_pkg::*;
#(
  parameter real R_OHM = 12.0
) (
  input  fp32_t vout,
  output fp32_t ir
);

  localparam fp32_t G = real_to_fp32(1.0 / R_OHM);

  fp32_mul u_mul (
    .a (vout),
    .b (G),
    .y (ir)
  );

endmodule
