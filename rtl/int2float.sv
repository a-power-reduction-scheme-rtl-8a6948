// Integer-to-float converter: signed IN_W-bit integer to IEEE-754 single.
//
// The magnitude is normalised with a leading-zero count, its top 24 bits
// become the significand and the bits below are rounded to nearest, ties to
// even. Zero gives +0. A 101-bit input always fits the single-precision
// exponent range (largest exponent 127 + 100), so no overflow can occur.
//
// Timing: registered output, latency 1 clock, one conversion per clock.
// The source design places this converter between sum and integration and
// gives its widths (101 bits in, 32 out); the rounding mode is this design's
// choice (round-to-nearest-even, the IEEE default).
module int2float
  import qdsp_pkg::*;
#(
  parameter int unsigned IN_W = SUM_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_int,
  output logic                   out_valid,
  output logic [31:0]            out_fp
);

  localparam int unsigned LZ_W = $clog2(IN_W + 1);

  logic              sign;
  logic [IN_W-1:0]   mag, norm;
  logic [LZ_W-1:0]   lz;
  logic [23:0]       sig;
  logic              guard, sticky, round_up;
  logic [24:0]       sig_r;
  logic [7:0]        exp_r;   // at most 127 + 100 + 1
  logic [31:0]       result;

  always_comb begin
    sign = in_int[IN_W-1];
    mag  = sign ? IN_W'(-in_int) : IN_W'(in_int);
    lz   = LZ_W'(IN_W);
    for (int i = 0; i < IN_W; i++) begin
      if (mag[i]) lz = LZ_W'(IN_W - 1 - i);
    end
    norm     = mag << lz;
    sig      = norm[IN_W-1 -: 24];
    guard    = norm[IN_W-25];
    sticky   = |norm[IN_W-26:0];
    round_up = guard && (sticky || sig[0]);
    sig_r    = {1'b0, sig} + 25'(round_up);
    exp_r    = 8'(127 + IN_W - 1) - 8'(lz) + 8'(sig_r[24]);
    if (mag == '0)
      result = 32'h0;
    else
      result = {sign, exp_r, sig_r[24] ? sig_r[23:1] : sig_r[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_fp    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_fp <= result;
    end
  end

endmodule
