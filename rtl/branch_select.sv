// branch_select: branch variables d and q of the full bridge.
//
// The model does not see the diodes as inputs; it infers which branch carries
// the inductor current from the four switch commands and the direction of iL:
//   d = 1 if S1 is ON, or if S1 and S3 are both OFF and iL < 0 (D1 conducts)
//   q = 1 if S2 is ON, or if S2 and S4 are both OFF and iL > 0 (D2 conducts)
// This rule is the reference design's. The sign of iL is given as two flags so the
// same block serves the float32 and the fixed-point models; iL = 0 sets
// neither. Combinational.
module branch_select
  import fb_pkg::*;
(
  input  sw_t  sw,      // switch commands, 1 = ON
  input  logic il_neg,  // iL < 0
  input  logic il_pos,  // iL > 0
  output dq_t  dq
);

  logic d, q;

  always_comb begin
    d  = sw.s1 || (!sw.s1 && !sw.s3 && il_neg);
    q  = sw.s2 || (!sw.s4 && !sw.s2 && il_pos);
    dq = dq_t'({d, q});
  end

endmodule
