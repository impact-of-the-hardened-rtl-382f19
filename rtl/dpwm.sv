// dpwm: digital PWM for the four switches of the full bridge.
//
// A counter runs from 0 to TSW_CYC-1, one count per clock (one integration
// step). While the count is below the duty value, S1 and S4 are ON (the
// bridge applies +vg); for the rest of the period S2 and S3 are ON (-vg).
// With this bipolar pattern the mean output is (2*D - 1)*vg, so a duty of
// 75 % gives 100 V from 200 V, as in the reference start-up experiment.
//
// The reference design asks only for a simple DPWM with a 50 us period. The bipolar
// pattern, the absence of dead time and the loading of a new duty value only
// at the start of a period (and during reset) are this design's choices. duty is a count of
// clock cycles, 0..TSW_CYC. period_start pulses on the first cycle of every
// period. Synchronous, active-high reset; nothing moves while en = 0.
module dpwm
  import fb_pkg::*;
#(
  parameter int TSW_CYC = 4000,
  localparam int CW = $clog2(TSW_CYC + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [CW-1:0] duty,
  output sw_t           sw,
  output logic          period_start
);

  logic [CW-1:0] cnt;
  logic [CW-1:0] duty_q;
  logic          high;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      duty_q <= duty;
    end else if (en) begin
      if (cnt == CW'(TSW_CYC - 1)) begin
        cnt    <= '0;
        duty_q <= duty;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb begin
    high         = (cnt < duty_q);
    sw.s1        = high;
    sw.s4        = high;
    sw.s2        = !high;
    sw.s3        = !high;
    period_start = (cnt == '0);
  end

endmodule
