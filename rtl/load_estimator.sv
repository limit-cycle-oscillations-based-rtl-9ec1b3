// load_estimator: load estimator and switch selector.
//
// The load resistance follows R = A_pp w0 pi L / (4 D_q G_d0) with G_d0 = V/D,
// so the product D_c * A_pp * f_LC grows with R, i.e. falls with load current.
// After each identification ('update') the product is compared with two
// programmable thresholds:
//   metric >= th_hi          -> s = SW_LIGHT (small transistors only)
//   th_lo <= metric < th_hi  -> s = SW_ALL   (all four transistors)
//   metric <  th_lo          -> s = SW_OFF   (current protection)
// While 'force_all' is high (from the detection of a disturbance until the
// estimate is ready) s is SW_ALL, so a light-to-heavy step never runs on the
// small transistors alone. The two thresholds, the product D_c*A_pp and the
// use of f_LC follow the document; taking f_LC in as a multiplier is this
// design's reading of how the thresholds depend on it. s resets to SW_ALL.
module load_estimator
  import lco_pkg::*;
#(
  parameter int DCW = DC_W,
  parameter int FW  = FLC_W,
  parameter int MW  = 2*DC_W + FLC_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           update,
  input  logic           force_all,
  input  logic [DCW-1:0] dc_ss,
  input  logic [DCW-1:0] app,
  input  logic [FW-1:0]  f_lc,
  input  logic [MW-1:0]  th_lo,
  input  logic [MW-1:0]  th_hi,
  output logic [1:0]     s,
  output logic [MW-1:0]  metric
);

  assign metric = MW'(dc_ss * app) * MW'(f_lc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              s <= SW_ALL;
    else if (force_all)      s <= SW_ALL;
    else if (update) begin
      if (metric < th_lo)      s <= SW_OFF;
      else if (metric >= th_hi) s <= SW_LIGHT;
      else                     s <= SW_ALL;
    end
  end

endmodule
