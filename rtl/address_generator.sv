// address_generator: picks one of the thirty stored control laws.
//
// The frequency of the compensator's complex zeros is rounded down by keeping
// only the four MSBs of the f_LC word (fifteen usable values; zero is not a
// valid frequency and is mapped to the lowest entry). Rounding down places the
// zeros below the measured resonance. Two laws with different damping share
// each frequency; the damping is chosen from the product D_c * A_pp, which
// is proportional to the power-stage Q factor (Q = pi A_pp / (4 D_q G_d0) with
// G_d0 = V/D). The product threshold Q_TH is this design's choice.
// Address = 2*(k-1) + (D_c*A_pp >= Q_TH). Purely combinational.
module address_generator
  import lco_pkg::*;
#(
  parameter int          FW   = FLC_W,
  parameter int          DCW  = DC_W,
  parameter int unsigned Q_TH = 1536
) (
  input  logic [FW-1:0]     f_lc,   // f_LC word
  input  logic [DCW-1:0]    dc_ss,  // steady-state duty D_c
  input  logic [DCW-1:0]    app,    // peak-to-peak LCO amplitude A_pp
  output logic [ADDR_W-1:0] addr,
  output logic              q_high  // high-damping-factor law selected
);

  logic [3:0]        k;
  logic [2*DCW-1:0]  prod;

  always_comb begin
    k      = f_lc[FW-1 -: 4];
    if (k == 4'd0) k = 4'd1;
    prod   = dc_ss * app;
    q_high = (prod >= (2*DCW)'(Q_TH));
    addr   = ADDR_W'({k - 4'd1, 1'b0}) + ADDR_W'(q_high);
  end

endmodule
