// Shared widths, types and constants of the qubit-state DSP.
//
// The data widths follow the processing flow of the design: 16-bit complex
// samples from the A/D converter, 89-bit full-precision low-pass filter
// output, 101-bit sums, and 32-bit IEEE-754 single precision from the
// integer-to-float converter onwards (integration and classification).
// The integration memory holds 1024 words, one per sum section of an
// integration section ("1,000 words or more"). The filter split into two
// cascaded stages and its tap counts are this design's own choice, sized so
// that the cascade's full-precision output is exactly 89 bits.
package qdsp_pkg;

  localparam int unsigned ADC_W   = 16;   // A/D sample width, each of I and Q
  localparam int unsigned FLT_W   = 89;   // low-pass filter output width
  localparam int unsigned SUM_W   = 101;  // sum output width
  localparam int unsigned FP_W    = 32;   // IEEE-754 single precision
  localparam int unsigned DEPTH   = 1024; // integration SRAM words
  localparam int unsigned ADDR_W  = $clog2(DEPTH);
  localparam int unsigned PASS_W  = 20;   // integration pass counter (121 - 101 bits of growth)

  // Filter cascade: stage 1 grows 16 -> 52 bits, stage 2 grows 52 -> 89 bits.
  localparam int unsigned COEF_W  = 32;
  localparam int unsigned TAPS1   = 16;
  localparam int unsigned TAPS2   = 32;

  // Tag that travels with every sum: the SRAM word it belongs to and whether
  // it falls in the first or the last integration section of an estimation.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic              first;
    logic              last;
  } int_tag_t;

  // IEEE-754 single-precision constants.
  localparam logic [31:0] FP_QNAN    = 32'h7fc0_0000;

endpackage
