// dpwm: counter-based digital pulse-width modulator with programmable resolution.
//
// A free-running N_BITS counter sets the switching period (2**N_BITS clock
// cycles; 1024 cycles of a 409.6 MHz clock give 400 kHz). The output pulse is
// high while the counter is below the latched duty word. The duty word is
// taken from dc at the last cycle of each period, so a new control value acts
// from the next period on. With drop = k > 0 the k LSBs of dc are removed by
// rounding to the nearest multiple of 2**k (saturating at the top), which
// makes the modulator a coarse quantizer: 10 b regular, 7 b (drop = 3) during
// identification. Rounding, rather than truncation, puts the quantizer step
// at the point where the dropped bits read 100, the point the zero-offset
// calibration steers to; that reading is this design's.
// period_start pulses for one cycle at counter zero; the controller samples
// the ADC and updates dc on it (one sample per switching period).
module dpwm #(
  parameter int N_BITS = lco_pkg::DC_W,
  parameter int DROP_W = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_BITS-1:0] dc,            // duty-ratio control word d_c[n]
  input  logic [DROP_W-1:0] drop,          // r_dpwm[n]: number of LSBs dropped
  output logic              pwm,           // delta(t)
  output logic              period_start,  // one-cycle pulse, start of period
  output logic [N_BITS-1:0] duty           // duty word in use this period
);

  logic [N_BITS-1:0] cnt;
  logic [N_BITS-1:0] dq;

  // Round dc to 2**drop steps, saturating at the largest coarse value.
  always_comb begin
    logic [N_BITS:0] sum;
    logic [N_BITS:0] maxv;
    sum  = '0;
    maxv = '0;
    if (drop == '0) begin
      dq = dc;
    end else begin
      sum  = ({1'b0, dc} + ((N_BITS+1)'(1) << (drop - 1'b1))) >> drop;
      maxv = ((N_BITS+1)'(1) << (N_BITS - int'(drop))) - 1'b1;
      if (sum > maxv) sum = maxv;
      dq = N_BITS'(sum << drop);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      duty <= '0;
      pwm  <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) duty <= dq;
      // Registered output: high during the first 'duty' cycles of the period.
      pwm <= ((cnt == '1) ? (dq != '0) : ((cnt + 1'b1) < duty));
    end
  end

  assign period_start = (cnt == '0);

endmodule
