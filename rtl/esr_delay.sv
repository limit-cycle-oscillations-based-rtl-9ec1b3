// esr_delay: optional extra loop delay used only during system
// identification.
//
// A capacitor ESR zero close to the L-C resonance adds phase lead, so the
// limit cycle settles above the resonance and the tuned zeros are placed
// too high. Delaying the error seen by the integral compensator by 'dly'
// samples adds a lag of 2*pi*f*dly/f_s that pulls the cycle back down. The
// delay acts only while 'en' is high (the integral law is in use); in
// regular operation e_out = e_in with no latency. The remedy follows the
// document, which describes it only as a delay component applied during
// identification; a shift register of up to MAX_DLY samples with a
// programmable tap ('dly', 0 = off) is this design's choice.
//
// Interface: e_in (signed error word) -> e_out; 'en' from the top level
// (comp_mode == integral), 'dly' from the id_dly port, 'sample_en' strobe.
//
// Timing: the register shifts on 'sample_en' (one pulse per switching
// period, the same strobe the compensator uses), so e_out is e_in from
// 'dly' samples earlier.
module esr_delay
  import lco_pkg::*;
#(
  parameter int EW      = E_W,
  parameter int MAX_DLY = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sample_en,
  input  logic                 en,        // identification phase
  input  logic [1:0]           dly,       // samples of delay, 0..MAX_DLY
  input  logic signed [EW-1:0] e_in,
  output logic signed [EW-1:0] e_out
);

  logic signed [EW-1:0] hist [MAX_DLY];  // hist[i] = e_in from i+1 samples ago

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_DLY; i++) hist[i] <= '0;
    end else if (sample_en) begin
      hist[0] <= e_in;
      for (int i = 1; i < MAX_DLY; i++) hist[i] <= hist[i-1];
    end
  end

  always_comb begin
    if (!en || dly == 2'd0 || int'(dly) > MAX_DLY) e_out = e_in;
    else                                           e_out = hist[int'(dly) - 1];
  end

endmodule
