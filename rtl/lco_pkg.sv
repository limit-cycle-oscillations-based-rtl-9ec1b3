// lco_pkg: types and constants shared by the limit-cycle auto-tuning controller.
//
// The controller works on one sample per switching period. The duty-ratio
// control word d_c[n] is DC_W = 10 bits wide (the resolution of the DPWM in
// regular operation); during system identification the DPWM drops DROP = 3
// LSBs and runs at 7 bits. Both numbers follow the prototype this design
// reproduces. The error word width, the coefficient format and the encodings
// below are choices of this design.
package lco_pkg;

  localparam int DC_W      = 10;  // duty-ratio word, regular DPWM resolution
  localparam int DROP      = 3;   // LSBs dropped during identification (10 b -> 7 b)
  localparam int E_W       = 8;   // signed error word from the window ADC
  localparam int COEF_W    = 10;  // PID coefficient word (signed)
  localparam int COEF_FRAC = 5;   // fractional bits of a PID coefficient
  localparam int ACC_FRAC  = 10;  // fractional bits of the compensator accumulator
  localparam int FLC_W     = 8;   // f_LC word (proportional to LCO frequency)
  localparam int TH_W      = 10;  // half-period counter
  localparam int LUT_WORDS = 30;  // thirty control laws
  localparam int ADDR_W    = 5;

  // Compensator law in use.
  typedef enum logic [1:0] {
    CM_CONV     = 2'd0,  // conventional worst-case PID (regain stability, before tuning)
    CM_TUNED    = 2'd1,  // PID loaded from the coefficient look-up table
    CM_INTEGRAL = 2'd2   // slow integral compensator K/s used while limit cycling
  } comp_mode_e;

  // Phases of the identification and tuning sequence.
  typedef enum logic [2:0] {
    ST_REGULAR = 3'd0,
    ST_REGAIN  = 3'd1,  // regain stability with the conventional PID
    ST_CAPTURE = 3'd2,  // integral law at full resolution, capture steady-state D_c
    ST_OFFSET  = 3'd3,  // zero-offset calibration of V_ref, settle
    ST_LOWRES  = 3'd4,  // reduced DPWM resolution, let the LCO build up
    ST_MEASURE = 3'd5,  // average A_pp and f_LC over several LCO periods
    ST_LOOKUP  = 3'd6,  // address generator and table read
    ST_LOAD    = 3'd7   // load coefficients, set s[n], restore resolution
  } mode_e;

  // Switch-enable word s[n]: bit 1 enables the large segment (Q1_H, Q2_H),
  // bit 0 the small segment (Q1_L, Q2_L).
  localparam logic [1:0] SW_OFF   = 2'b00;  // current protection
  localparam logic [1:0] SW_LIGHT = 2'b01;  // light load: small transistors only
  localparam logic [1:0] SW_ALL   = 2'b11;  // heavy load / transitions: all four

  typedef struct packed {
    logic signed [COEF_W-1:0] a0;
    logic signed [COEF_W-1:0] a1;
    logic signed [COEF_W-1:0] a2;
  } coef_t;

endpackage
