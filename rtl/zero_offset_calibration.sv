// zero_offset_calibration: moves the voltage reference so that the limit cycle
// is symmetric.
//
// Before the DPWM drops DROP LSBs, the offset of d_c inside a coarse step is
// read from the dropped bits of the steady-state duty D_c. The reference
// V_ref[n] is raised by (100...0b - dropped bits), which steers those bits to
// the midpoint of two coarse values: for DROP = 3 and bits 001 the offset is
// +011. The offset is added to the one in use on 'calc' and removed on
// 'clear'; 'offset' gives the value that 'calc' would add (signed, DROP+1
// bits). With 'fine' high (amplitude limiter, one bit fewer dropped) the
// midpoint is taken for K-1 bits (10b minus the two LSBs); because D_c has
// already been moved to 100b, this adds +2, centring d_c between two 8-bit
// values. The fine-step case and the accumulation are this design's. The reference
// word is in units chosen so that one V_ref LSB moves d_c by about one LSB.
module zero_offset_calibration
  import lco_pkg::*;
#(
  parameter int DCW = DC_W,
  parameter int VW  = 12,
  parameter int K   = DROP
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               calc,
  input  logic               clear,
  input  logic               fine,      // re-centre for K-1 dropped bits
  input  logic [DCW-1:0]     dc_ss,
  input  logic [VW-1:0]      vref_nom,  // nominal digital reference
  output logic signed [K:0]  offset,    // offset that calc would apply
  output logic signed [K:0]  vref_off,  // offset in use
  output logic [VW-1:0]      vref       // V_ref[n] to the ADC
);

  localparam logic [K:0] MID   = (K+1)'(1) << (K - 1);
  localparam logic [K:0] MID_F = (K+1)'(1) << (K - 2);
  localparam logic [K:0] MSK_F = ((K+1)'(1) << (K - 1)) - 1'b1;

  assign offset = fine ? $signed(MID_F - ({1'b0, dc_ss[K-1:0]} & MSK_F))
                       : $signed(MID - {1'b0, dc_ss[K-1:0]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     vref_off <= '0;
    else if (clear) vref_off <= '0;
    else if (calc)  vref_off <= vref_off + offset;
  end

  assign vref = VW'($signed({1'b0, vref_nom}) + VW'(vref_off));

endmodule
