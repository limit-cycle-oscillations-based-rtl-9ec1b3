// amplitude_meter: peak-to-peak amplitude of the limit cycle in d_c[n].
//
// Watches the sign of the first difference d_c[n] - d_c[n-1]. The value
// d_c[n-1] just before the sign turns from positive to negative is the
// maximum A_max; the one before a turn from negative to positive is the
// minimum A_min. At every maximum after a minimum has been seen, A_pp =
// A_max - A_min is output with a one-cycle app_valid. Samples with zero
// difference (plateaus of the staircase) keep the last sign; that rule is
// this design's. en is the per-sample strobe; clear restarts the search.
module amplitude_meter
  import lco_pkg::*;
#(
  parameter int DCW = DC_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           clear,
  input  logic [DCW-1:0] dc,
  output logic [DCW-1:0] app,
  output logic           app_valid,
  output logic [DCW-1:0] a_max,
  output logic [DCW-1:0] a_min
);

  logic [DCW-1:0] dc_prev;
  logic           primed;    // dc_prev holds a sample
  logic [1:0]     dir;       // 2'b01 rising, 2'b10 falling, 2'b00 unknown
  logic           have_min;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc_prev   <= '0;
      primed    <= 1'b0;
      dir       <= 2'b00;
      have_min  <= 1'b0;
      a_max     <= '0;
      a_min     <= '0;
      app       <= '0;
      app_valid <= 1'b0;
    end else begin
      app_valid <= 1'b0;
      if (clear) begin
        primed   <= 1'b0;
        dir      <= 2'b00;
        have_min <= 1'b0;
      end else if (en) begin
        dc_prev <= dc;
        primed  <= 1'b1;
        if (primed) begin
          if (dc > dc_prev) begin
            if (dir == 2'b10) begin
              a_min    <= dc_prev;
              have_min <= 1'b1;
            end
            dir <= 2'b01;
          end else if (dc < dc_prev) begin
            if (dir == 2'b01) begin
              a_max <= dc_prev;
              if (have_min) begin
                app       <= dc_prev - a_min;
                app_valid <= 1'b1;
              end
            end
            dir <= 2'b10;
          end
        end
      end
    end
  end

endmodule
