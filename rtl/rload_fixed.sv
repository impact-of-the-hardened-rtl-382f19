// rload_fixed: resistive load of the converter, fixed point.
//
// iR = vout * G with G = 1/R held as a signed constant with GF fraction bits;
// the product is rounded to the state format (FW fraction bits) by adding half
// an LSB and shifting right. Combinational; the result always fits, since
// |iR| < |vout| for R > 1 ohm. Writing the load as a conductance multiply and
// the rounding are this design's choices.
module rload_fixed
  import fb_pkg::*;
#(
  parameter real R_OHM = 12.0,
  parameter int  IW    = FX_IW,
  parameter int  FW    = FX_FW,
  parameter int  GF    = 40,
  localparam int W     = IW + FW
) (
  input  logic signed [W-1:0] vout,
  output logic signed [W-1:0] ir
);

  localparam logic signed [GF+1:0] G = (GF + 2)'(real_to_fix(1.0 / R_OHM, GF));

  logic signed [W+GF+1:0] prod;
  logic signed [W+GF+1:0] rnd;

  always_comb begin
    prod = vout * G;
    rnd  = prod + (W + GF + 2)'(longint'(1) <<< (GF - 1));
    ir   = W'(rnd >>> GF);
  end

endmodule
