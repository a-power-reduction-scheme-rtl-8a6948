// Qubit-state estimation DSP, floating-point integration flow.
//
// The reflected read-out wave of a qubit arrives as a stream of 16-bit
// complex samples, one per clock. The stream is low-pass filtered in full
// precision (89 bits), successive samples of each sum section are added
// (101 bits), each sum is converted to IEEE-754 single precision, and the
// sums of corresponding sum sections of n_pass integration sections are
// accumulated in a 1024-word floating-point SRAM (integration). The results
// of the last pass are put out and classified as |0> or |1>.
//
// Converting to floating point before integration, rather than after it,
// shrinks the integration SRAM words from 121 to 32 bits; that ordering is
// the main idea of the source design and is kept here. The section gates
// sum_sec and int_sec are given with the samples and travel through the
// filters beside them.
//
// Interface: adc_re/adc_im, sum_sec, int_sec every clock; filter
// coefficients through coef_we/coef_stage/coef_idx/coef_data; n_pass and the
// classifier weights as static configuration. Results: int_valid/int_re/
// int_im/int_addr (integration, last pass) and state_valid/state/state_addr.
//
// Timing: filters 2 clocks, then a sum is complete the clock after its last
// sample; sum 1, converter 1, integration 2 and classifier 1 clock(s) more.
// int_valid rises 7 clocks and state_valid 8 clocks after the last sample of
// a sum section enters adc_re/adc_im.
module qubit_dsp_top
  import qdsp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // A/D converter samples and section gates
  input  logic signed [ADC_W-1:0]  adc_re,
  input  logic signed [ADC_W-1:0]  adc_im,
  input  logic                     sum_sec,
  input  logic                     int_sec,
  // configuration
  input  logic                     coef_we,
  input  logic                     coef_stage,
  input  logic [$clog2(TAPS2)-1:0] coef_idx,
  input  logic signed [COEF_W-1:0] coef_data,
  input  logic [PASS_W-1:0]        n_pass,
  input  logic [31:0]              w_re,
  input  logic [31:0]              w_im,
  input  logic [31:0]              bias,
  // integration results (last pass)
  output logic                     int_valid,
  output logic [31:0]              int_re,
  output logic [31:0]              int_im,
  output logic [ADDR_W-1:0]        int_addr,
  // estimated states
  output logic                     state_valid,
  output logic                     state,
  output logic [ADDR_W-1:0]        state_addr
);

  logic signed [FLT_W-1:0] flt_re, flt_im;
  logic [1:0]              flt_side;
  logic                    sum_en, sum_start, sum_emit;
  int_tag_t                sc_tag, sum_tag, cv_tag;
  logic                    sum_valid;
  logic signed [SUM_W-1:0] sum_re, sum_im;
  logic                    cv_valid, cv_valid_im;
  logic [31:0]             cv_re, cv_im;

  lowpass_filters u_filters (
    .clk, .rst_n,
    .coef_we, .coef_stage, .coef_idx, .coef_data,
    .in_re (adc_re), .in_im (adc_im), .side_in ({int_sec, sum_sec}),
    .out_re (flt_re), .out_im (flt_im), .side_out (flt_side)
  );

  section_ctrl u_sections (
    .clk, .rst_n,
    .sum_sec (flt_side[0]), .int_sec (flt_side[1]), .n_pass,
    .sum_en, .sum_start, .sum_emit, .tag (sc_tag)
  );

  sum_unit u_sum (
    .clk, .rst_n,
    .in_re (flt_re), .in_im (flt_im),
    .sum_en, .sum_start, .sum_emit, .tag_in (sc_tag),
    .out_valid (sum_valid), .sum_re, .sum_im, .tag_out (sum_tag)
  );

  int2float u_cvt_re (
    .clk, .rst_n, .in_valid (sum_valid), .in_int (sum_re),
    .out_valid (cv_valid), .out_fp (cv_re)
  );
  int2float u_cvt_im (
    .clk, .rst_n, .in_valid (sum_valid), .in_int (sum_im),
    .out_valid (cv_valid_im), .out_fp (cv_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cv_tag <= '0;
    else if (sum_valid) cv_tag <= sum_tag;
  end

  integration u_integration (
    .clk, .rst_n,
    .in_valid (cv_valid), .in_re (cv_re), .in_im (cv_im), .tag_in (cv_tag),
    .out_valid (int_valid), .out_re (int_re), .out_im (int_im), .out_addr (int_addr)
  );

  classifier u_classifier (
    .clk, .rst_n,
    .in_valid (int_valid), .in_re (int_re), .in_im (int_im), .in_addr (int_addr),
    .w_re, .w_im, .bias,
    .out_valid (state_valid), .state, .out_addr (state_addr)
  );

  // Both converters run in lock step.
  a_cvt_lockstep: assert property (@(posedge clk) disable iff (!rst_n) cv_valid == cv_valid_im);

endmodule
