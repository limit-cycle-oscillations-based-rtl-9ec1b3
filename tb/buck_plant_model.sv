// buck_plant_model: behavioural model of the analog side, for simulation only.
//
// Stands in for the synchronous buck power stage with segmented switches and
// for the window ADC. The inductor current and capacitor voltage are
// integrated (forward Euler) once per controller clock. While a drive request
// (c_h or c_l) is high the switch node is at VG; otherwise the synchronous
// rectifier holds it at ground, unless both segments are disabled (s = 00),
// in which case the inductor current decays to zero through the body diode
// and stays there. The on-resistance depends on which segments conduct. The
// ADC converts (V_ref - v_out) with a 20 mV step, rounding to the nearest
// step and saturating to the signed error word, and updates every clock.
// The reference word has an LSB of VREF_LSB volts. Load resistance r_load and
// capacitance c_out may be changed by the testbench at any time.
module buck_plant_model #(
  parameter real VG       = 8.0,
  parameter real L        = 33.0e-6,
  parameter real RL       = 0.1,
  parameter real R_ON_LO  = 0.15,   // small segment alone
  parameter real R_ON_ALL = 0.07,   // both segments in parallel
  parameter real T_CLK    = 2.5e-6 / 1024.0,
  parameter real ADC_LSB  = 0.02,
  parameter real VREF_LSB = 8.0 / 1024.0,
  parameter int  EW       = 8,
  parameter int  VW       = 12
) (
  input  logic                 clk,
  input  logic                 c_h,
  input  logic                 c_l,
  input  logic [1:0]           s,
  input  logic [VW-1:0]        vref,
  output logic signed [EW-1:0] e
);

  real r_load = 5.0;
  real c_out  = 38.0e-6;
  real v      = 0.0;
  real il     = 0.0;

  real vsw, ron, err, q;
  int  qi;

  always_ff @(posedge clk) begin
    ron = (s == 2'b01) ? R_ON_LO : R_ON_ALL;
    if (c_h || c_l) vsw = VG;
    else            vsw = 0.0;
    if (s == 2'b00 && il <= 0.0) begin
      il = 0.0;
    end else begin
      il = il + (vsw - v - il * (RL + ron)) / L * T_CLK;
      if (s == 2'b00 && il < 0.0) il = 0.0;
    end
    v = v + (il - v / r_load) / c_out * T_CLK;
    err = (real'(vref) * VREF_LSB - v) / ADC_LSB;
    q   = (err >= 0.0) ? err + 0.5 : err - 0.5;
    qi  = int'($rtoi(q));
    if (qi >  (1 << (EW-1)) - 1) qi = (1 << (EW-1)) - 1;
    if (qi < -(1 << (EW-1)))     qi = -(1 << (EW-1));
    e <= EW'(qi);
  end

endmodule
