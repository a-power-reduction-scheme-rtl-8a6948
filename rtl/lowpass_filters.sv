// Low-pass filter bank: two cascaded full-precision FIR stages.
//
// Takes the 16-bit complex A/D sample stream and produces the 89-bit
// full-precision filtered stream (16 -> 52 bits in stage 1 with 16 taps,
// 52 -> 89 bits in stage 2 with 32 taps, 32-bit coefficients). The 16-bit
// input and 89-bit output widths are those of the source design; the
// cascade, the tap counts and the coefficient width are this design's own
// choice. Coefficients are loaded with coef_we, coef_stage (0 or 1),
// coef_idx and coef_data.
//
// Timing: one sample per clock, latency 2 clocks. The section gates given on
// side_in come out on side_out aligned with the filtered sample.
module lowpass_filters
  import qdsp_pkg::*;
#(
  parameter int unsigned IN_W   = ADC_W,
  parameter int unsigned CW     = COEF_W,
  parameter int unsigned T1     = TAPS1,
  parameter int unsigned T2     = TAPS2,
  parameter int unsigned SIDE_W = 2,
  parameter int unsigned MID_W  = IN_W + CW + $clog2(T1),
  parameter int unsigned OUT_W  = MID_W + CW + $clog2(T2),
  parameter int unsigned IDX_W  = $clog2(T1 > T2 ? T1 : T2)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_we,
  input  logic                     coef_stage,
  input  logic [IDX_W-1:0]         coef_idx,
  input  logic signed [CW-1:0]     coef_data,
  input  logic signed [IN_W-1:0]   in_re,
  input  logic signed [IN_W-1:0]   in_im,
  input  logic [SIDE_W-1:0]        side_in,
  output logic signed [OUT_W-1:0]  out_re,
  output logic signed [OUT_W-1:0]  out_im,
  output logic [SIDE_W-1:0]        side_out
);

  logic signed [MID_W-1:0] mid_re, mid_im;
  logic [SIDE_W-1:0]       mid_side;

  fir_stage #(.IN_W(IN_W), .COEF_W(CW), .TAPS(T1), .SIDE_W(SIDE_W)) u_stage1 (
    .clk, .rst_n,
    .coef_we  (coef_we && !coef_stage),
    .coef_idx (coef_idx[$clog2(T1)-1:0]),
    .coef_data,
    .in_re, .in_im, .side_in,
    .out_re (mid_re), .out_im (mid_im), .side_out (mid_side)
  );

  fir_stage #(.IN_W(MID_W), .COEF_W(CW), .TAPS(T2), .SIDE_W(SIDE_W)) u_stage2 (
    .clk, .rst_n,
    .coef_we  (coef_we && coef_stage),
    .coef_idx (coef_idx[$clog2(T2)-1:0]),
    .coef_data,
    .in_re (mid_re), .in_im (mid_im), .side_in (mid_side),
    .out_re, .out_im, .side_out
  );

endmodule
