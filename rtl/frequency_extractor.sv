// frequency_extractor: measures the half period of the limit cycle.
//
// A counter clocked once per switching period is started when d_c_ac[n]
// turns positive and stopped by the next negative d_c_ac[n]; the count is
// the half LCO period T_LC/2 in switching periods. d_c_ac = 0 counts as
// positive (the sign bit decides): after zero-offset calibration the coarse
// DPWM step lies between D_c - 1 and D_c, so d_c >= D_c is the upper half of
// the cycle. Treating zero as a third, neutral value would bias the count by
// the length of the plateau at D_c. Each stop gives a one-cycle
// 'valid' with the count t_half and the word f_lc = FREQ_SCALE / t_half,
// proportional to the LCO frequency (f_LC = f_lc * f_s / (2*FREQ_SCALE); with
// the default 4800 and f_s = 400 kHz one LSB is 41.67 Hz). The counter and its
// start/stop rule follow the document. The reciprocal, which turns the count
// into a frequency word whose MSBs can be rounded down, and FREQ_SCALE are
// this design's. The counter saturates at its maximum.
module frequency_extractor
  import lco_pkg::*;
#(
  parameter int          DCW        = DC_W,
  parameter int          TW         = TH_W,
  parameter int          FW         = FLC_W,
  parameter int unsigned FREQ_SCALE = 4800
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               clear,
  input  logic signed [DCW:0] dc_ac,
  output logic [TW-1:0]      t_half,
  output logic [FW-1:0]      f_lc,
  output logic               valid
);

  logic          pos_prev;
  logic          running;
  logic [TW-1:0] cnt;
  logic [31:0]   quot;

  always_comb begin
    quot = (cnt == '0) ? 32'(FREQ_SCALE) : (32'(FREQ_SCALE) / 32'(cnt));
    if (quot > 32'((1 << FW) - 1)) quot = 32'((1 << FW) - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_prev <= 1'b1;
      running  <= 1'b0;
      cnt      <= '0;
      t_half   <= '0;
      f_lc     <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (clear) begin
        pos_prev <= 1'b1;  // a cycle already above zero does not count
        running  <= 1'b0;
        cnt      <= '0;
      end else if (en) begin
        pos_prev <= (dc_ac >= 0);
        if (running) begin
          if (dc_ac < 0) begin
            running <= 1'b0;
            t_half  <= cnt;
            f_lc    <= FW'(quot);
            valid   <= 1'b1;
          end else if (cnt != '1) begin
            cnt <= cnt + 1'b1;
          end
        end else if (dc_ac >= 0 && !pos_prev) begin
          running <= 1'b1;
          cnt     <= TW'(1);
        end
      end
    end
  end

endmodule
