// instability_detector: starts the identification and reports steady state.
//
// 'start' pulses for one cycle when the sampled error reaches |e| >= E_DIST
// (a disturbance that may leave the loop poorly compensated) or on a rising
// edge of the external 'check' input (periodic recalibration). 'stable' is
// high once |e| <= E_STEADY has held for STABLE_N consecutive samples. The
// document names this block and its inputs (e[n], check) and output (start)
// but refers elsewhere for its insides; the thresholds and the consecutive-
// sample rule are this design's.
module instability_detector
  import lco_pkg::*;
#(
  parameter int EW       = E_W,
  parameter int E_DIST   = 10,
  parameter int E_STEADY = 1,
  parameter int STABLE_N = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [EW-1:0] e,
  input  logic                 check,
  output logic                 start,
  output logic                 stable
);

  localparam int CW = $clog2(STABLE_N + 1);

  logic [EW-1:0] mag;
  logic          check_q;
  logic [CW-1:0] quiet;

  assign mag = (e < 0) ? EW'(-e) : EW'(e);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      check_q <= 1'b0;
      quiet   <= '0;
      start   <= 1'b0;
    end else begin
      check_q <= check;
      start   <= (check & ~check_q) | (en && int'(mag) >= E_DIST);
      if (en) begin
        if (int'(mag) > E_STEADY)      quiet <= '0;
        else if (int'(quiet) < STABLE_N) quiet <= quiet + 1'b1;
      end
    end
  end

  assign stable = (int'(quiet) >= STABLE_N);

endmodule
