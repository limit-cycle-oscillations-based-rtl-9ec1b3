// switch_select: steers the DPWM pulse to the segmented power transistors.
//
// The buck power stage has two parallel segments in both the main switch and
// the synchronous rectifier: a small one (Q1_L/Q2_L, low gate charge, higher
// on-resistance) and a large one (Q1_H/Q2_H). The 2-bit switching sequence
// s[n] from the load estimator decides which segments follow the pulse:
// s[0] enables the small segment (c_L), s[1] the large one (c_H). s = 00
// keeps both off (current protection). The outputs are registered, so they
// follow pwm with one clock of delay. The bit assignment of s is this
// design's; the gate drivers, and the inverted drive of the rectifier
// transistors, sit in the analog power stage.
module switch_select (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pwm,  // delta(t) from the DPWM
  input  logic [1:0] s,    // switching sequence s[n]
  output logic       c_h,  // drive request, large segment
  output logic       c_l   // drive request, small segment
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_h <= 1'b0;
      c_l <= 1'b0;
    end else begin
      c_h <= pwm & s[1];
      c_l <= pwm & s[0];
    end
  end

endmodule
