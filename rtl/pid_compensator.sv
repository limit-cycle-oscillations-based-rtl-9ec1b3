// pid_compensator: programmable PID / integral voltage-loop compensator.
//
// Implements the incremental control law
//   d_c[n] = d_c[n-1] + a0*e[n] + a1*e[n-1] + a2*e[n-2]
// once per switching period (on sample_en). Three coefficient sets are
// available, chosen by 'mode':
//   CM_CONV     - the conventional worst-case PID (parameters A*_CONV), used
//                 before any tuning and to regain stability,
//   CM_TUNED    - the set last loaded from the coefficient look-up table
//                 (coef_in, taken on coef_load),
//   CM_INTEGRAL - a slow integrator K/s, d_c[n] = d_c[n-1] + K*e[n], used
//                 while limit cycles are measured.
// The control law and the three modes follow the document. Number formats are
// this design's: coefficients are signed COEF_W-bit words with COEF_FRAC
// fraction bits, in d_c LSBs per error LSB; the accumulator keeps ACC_FRAC
// extra fraction bits so that a very small integral gain INT_GAIN (in units of
// 2**-ACC_FRAC) still integrates. The accumulator saturates to the valid duty
// range. dc is the integer part and is valid the cycle after sample_en
// (dc_valid). Changing mode keeps the accumulator, so law switches are bumpless.
module pid_compensator
  import lco_pkg::*;
#(
  parameter int          DCW      = DC_W,
  parameter int          EW       = E_W,
  parameter int          CW       = COEF_W,
  parameter int          CFRAC    = COEF_FRAC,
  parameter int          AFRAC    = ACC_FRAC,
  parameter int          A0_CONV  = 192,   // conventional PID, Kd = 6, fz = 3.5 kHz, Q = 1
  parameter int          A1_CONV  = -373,
  parameter int          A2_CONV  = 182,
  parameter int          INT_GAIN = 64,    // K = 64 * 2**-10 = 1/16 d_c LSB per error LSB
  parameter int unsigned DC_INIT  = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sample_en,
  input  logic signed [EW-1:0]  e,
  input  comp_mode_e            mode,
  input  logic                  coef_load,
  input  coef_t                 coef_in,
  output logic [DCW-1:0]        dc,
  output logic                  dc_valid,
  output coef_t                 coef_tuned
);

  localparam int ACC_W = DCW + AFRAC;
  localparam int SUM_W = ACC_W + 4;  // head-room for the signed increment
  localparam logic signed [SUM_W-1:0] ACC_MAX = SUM_W'((longint'(1) << ACC_W) - 1);

  logic [ACC_W-1:0]       acc;
  logic signed [EW-1:0]   e1, e2;

  logic signed [CW-1:0]   a0, a1, a2;
  logic signed [SUM_W-1:0] inc, nxt;

  always_comb begin
    unique case (mode)
      CM_TUNED: begin a0 = coef_tuned.a0; a1 = coef_tuned.a1; a2 = coef_tuned.a2; end
      default:  begin a0 = CW'(A0_CONV);  a1 = CW'(A1_CONV);  a2 = CW'(A2_CONV);  end
    endcase
    if (mode == CM_INTEGRAL)
      inc = SUM_W'(INT_GAIN) * SUM_W'(e);
    else
      inc = (SUM_W'(a0) * SUM_W'(e) + SUM_W'(a1) * SUM_W'(e1) + SUM_W'(a2) * SUM_W'(e2))
            <<< (AFRAC - CFRAC);
    nxt = $signed({4'b0, acc}) + inc;
    if (nxt < 0)            nxt = '0;
    else if (nxt > ACC_MAX) nxt = ACC_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= ACC_W'(DC_INIT) << AFRAC;
      e1         <= '0;
      e2         <= '0;
      dc_valid   <= 1'b0;
      coef_tuned <= '{a0: CW'(A0_CONV), a1: CW'(A1_CONV), a2: CW'(A2_CONV)};
    end else begin
      dc_valid <= sample_en;
      if (sample_en) begin
        acc <= ACC_W'(nxt);
        e1  <= e;
        e2  <= e1;
      end
      if (coef_load) coef_tuned <= coef_in;
    end
  end

  assign dc = acc[ACC_W-1:AFRAC];

endmodule
