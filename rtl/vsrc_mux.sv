// vsrc_mux: source term of the inductor voltage, float32.
//
// Following the schematic of the model, the input voltage vg enters a
// four-way selector driven by dq together with its negation:
//   dq = 10 -> vg,  dq = 01 -> -vg,  dq = 00 or 11 -> 0.
// The result minus vout is the inductor voltage vL. Negation of a float32
// word is a flip of its sign bit, so the block needs no arithmetic core.
// Combinational.
module vsrc_mux
  import fb_pkg::*;
(
  input  fp32_t vg,
  input  dq_t   dq,
  output fp32_t vsel
);

  always_comb begin
    unique case (dq)
      DQ_10:   vsel = vg;
      DQ_01:   vsel = {~vg[31], vg[30:0]};
      default: vsel = FP32_ZERO;
    endcase
  end

endmodule
