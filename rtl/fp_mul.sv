// Single-precision floating-point multiplier (combinational).
//
// Multiplies the two 24-bit significands, normalises the 48-bit product by at
// most one place and rounds to nearest, ties to even. As in fp_add,
// subnormal inputs count as zero, subnormal results flush to signed zero and
// an exponent of 255 is infinity; 0 * inf gives the quiet NaN 7fc00000.
// Used by the classifier; its design is this design's own.
module fp_mul
  import qdsp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        s, a_inf, b_inf, a_zero, b_zero, rnd;
  logic [47:0] p;
  logic [23:0] m;
  logic        g, st;
  logic [24:0] m_r;
  logic signed [10:0] e, e_r;

  always_comb begin
    s      = a[31] ^ b[31];
    a_inf  = (a[30:23] == 8'hff);
    b_inf  = (b[30:23] == 8'hff);
    a_zero = (a[30:23] == 8'h00);
    b_zero = (b[30:23] == 8'h00);
    p = 48'({1'b1, a[22:0]}) * 48'({1'b1, b[22:0]});
    e = 11'(a[30:23]) + 11'(b[30:23]) - 11'sd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 11'sd1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    rnd = g && (st || m[0]);
    m_r = {1'b0, m} + 25'(rnd);
    e_r = e + 11'(m_r[24]);

    if ((a_inf && b_zero) || (b_inf && a_zero))
      y = FP_QNAN;
    else if (a_inf || b_inf)
      y = {s, 31'h7f80_0000};
    else if (a_zero || b_zero)
      y = {s, 31'h0};
    else if (e_r >= 11'sd255)
      y = {s, 31'h7f80_0000};
    else if (e_r <= 11'sd0)
      y = {s, 31'h0};
    else
      y = {s, e_r[7:0], m_r[24] ? m_r[23:1] : m_r[22:0]};
  end

endmodule
