// Self-checking testbench of lowpass_filters at its default size (16-bit
// input, 32-bit coefficients, 16 + 32 taps, 89-bit output). Loads random
// coefficients into both stages, feeds random complex samples, including
// full-scale ones, and compares every output with a direct convolution
// y1 = c1 * x, y2 = c2 * y1 computed in wide arithmetic, two clocks after
// the sample. The side-band bits must come out with the same delay.
module tb_lowpass_filters;
  import qdsp_pkg::*;

  localparam int MID_W = ADC_W + COEF_W + 4;
  localparam int OUT_W = MID_W + COEF_W + 5;
  localparam int N = 600;

  logic clk = 0, rst_n = 0, coef_we = 0, coef_stage = 0;
  logic [4:0] coef_idx = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic signed [ADC_W-1:0] in_re = '0, in_im = '0;
  logic [1:0] side_in = '0, side_out;
  logic signed [OUT_W-1:0] out_re, out_im;
  int checks = 0, failures = 0;

  logic signed [COEF_W-1:0] c1 [TAPS1];
  logic signed [COEF_W-1:0] c2 [TAPS2];
  logic signed [ADC_W-1:0]  xr [N], xi [N];
  logic [1:0]               sd [N];
  logic signed [MID_W-1:0]  y1r [N], y1i [N];

  lowpass_filters dut (.clk, .rst_n, .coef_we, .coef_stage, .coef_idx, .coef_data,
                       .in_re, .in_im, .side_in, .out_re, .out_im, .side_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < TAPS1; j++) c1[j] = (j == 0) ? {1'b1, 31'b0} : $urandom;
    for (int j = 0; j < TAPS2; j++) c2[j] = (j == 0) ? {1'b1, 31'b0} : $urandom;
    for (int j = 0; j < TAPS1; j++) begin
      @(negedge clk); coef_we = 1; coef_stage = 0; coef_idx = 5'(j); coef_data = c1[j];
    end
    for (int j = 0; j < TAPS2; j++) begin
      @(negedge clk); coef_we = 1; coef_stage = 1; coef_idx = 5'(j); coef_data = c2[j];
    end
    @(negedge clk); coef_we = 0;
    // zero input flushes the tap lines (they hold zero since reset)
    for (int n = 0; n < N; n++) begin
      xr[n] = (n < 40) ? {1'b1, 15'b0} : 16'($urandom);
      xi[n] = (n < 40) ? 16'sh7fff : 16'($urandom);
      sd[n] = 2'($urandom);
    end
    for (int n = 0; n < N; n++) begin
      logic signed [MID_W-1:0] ar, ai;
      ar = '0; ai = '0;
      for (int j = 0; j < TAPS1; j++)
        if (n - j >= 0) begin
          ar += MID_W'(xr[n-j]) * MID_W'(c1[j]);
          ai += MID_W'(xi[n-j]) * MID_W'(c1[j]);
        end
      y1r[n] = ar; y1i[n] = ai;
    end
    for (int n = 0; n < N + 2; n++) begin
      @(negedge clk);
      if (n < N) begin
        in_re = xr[n]; in_im = xi[n]; side_in = sd[n];
      end
      if (n >= 2) begin
        logic signed [OUT_W-1:0] br, bi;
        int m;
        m = n - 2;
        br = '0; bi = '0;
        for (int j = 0; j < TAPS2; j++)
          if (m - j >= 0) begin
            br += OUT_W'(y1r[m-j]) * OUT_W'(c2[j]);
            bi += OUT_W'(y1i[m-j]) * OUT_W'(c2[j]);
          end
        #1;
        checks++;
        if (out_re !== br || out_im !== bi || side_out !== sd[m]) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: got %h %h side %b, expected %h %h side %b",
                                      m, out_re, out_im, side_out, br, bi, sd[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
