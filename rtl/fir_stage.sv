// One full-precision FIR low-pass stage for a complex sample stream.
//
// The same TAPS real, signed coefficients filter the I and the Q component:
// y[n] = sum_{j=0}^{TAPS-1} c[j] * x[n-j]. Nothing is rounded or truncated,
// so the output is IN_W + COEF_W + clog2(TAPS) bits wide. Coefficients are
// written one at a time through coef_we/coef_idx/coef_data and reset to zero.
// A side-band word (section gates) is delayed alongside the data so that it
// stays aligned with the filtered samples.
//
// Timing: one sample per clock; out_* and side_out appear one clock after the
// sample that completes them (latency 1). The tap line resets to zero.
//
// The filter is only named in the source design with its 16-bit input and
// 89-bit output; the direct-form FIR with real coefficients is this design's
// own choice.
module fir_stage #(
  parameter int unsigned IN_W   = 16,
  parameter int unsigned COEF_W = 32,
  parameter int unsigned TAPS   = 16,
  parameter int unsigned SIDE_W = 2,
  parameter int unsigned OUT_W  = IN_W + COEF_W + $clog2(TAPS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      coef_we,
  input  logic [$clog2(TAPS)-1:0]   coef_idx,
  input  logic signed [COEF_W-1:0]  coef_data,
  input  logic signed [IN_W-1:0]    in_re,
  input  logic signed [IN_W-1:0]    in_im,
  input  logic [SIDE_W-1:0]         side_in,
  output logic signed [OUT_W-1:0]   out_re,
  output logic signed [OUT_W-1:0]   out_im,
  output logic [SIDE_W-1:0]         side_out
);

  logic signed [COEF_W-1:0] coef [TAPS];
  logic signed [IN_W-1:0]   dl_re [TAPS-1];   // x[n-1] .. x[n-TAPS+1]
  logic signed [IN_W-1:0]   dl_im [TAPS-1];
  logic signed [OUT_W-1:0]  acc_re, acc_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < TAPS; j++) coef[j] <= '0;
    end else if (coef_we) begin
      coef[coef_idx] <= coef_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < TAPS-1; j++) begin
        dl_re[j] <= '0;
        dl_im[j] <= '0;
      end
    end else begin
      dl_re[0] <= in_re;
      dl_im[0] <= in_im;
      for (int j = 1; j < TAPS-1; j++) begin
        dl_re[j] <= dl_re[j-1];
        dl_im[j] <= dl_im[j-1];
      end
    end
  end

  always_comb begin
    acc_re = OUT_W'(in_re) * OUT_W'(coef[0]);
    acc_im = OUT_W'(in_im) * OUT_W'(coef[0]);
    for (int j = 1; j < TAPS; j++) begin
      acc_re = acc_re + OUT_W'(dl_re[j-1]) * OUT_W'(coef[j]);
      acc_im = acc_im + OUT_W'(dl_im[j-1]) * OUT_W'(coef[j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_re   <= '0;
      out_im   <= '0;
      side_out <= '0;
    end else begin
      out_re   <= acc_re;
      out_im   <= acc_im;
      side_out <= side_in;
    end
  end

endmodule
