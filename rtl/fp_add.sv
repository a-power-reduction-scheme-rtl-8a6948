// Single-precision floating-point adder (combinational).
//
// Computes a + b with round-to-nearest-even on normal numbers. The operand
// of larger magnitude is kept, the other is aligned to it with guard, round
// and sticky bits, the significands are added or subtracted, the result is
// normalised with a leading-zero count and rounded. Like a non-IEEE-compliant
// library adder, subnormal inputs are read as zero and subnormal results are
// flushed to zero; an exponent of 255 is read as infinity. An exact
// cancellation gives +0; inf - inf gives the quiet NaN 7fc00000. Overflow
// gives a signed infinity.
//
// The source design replaces the integer adders of its integration stage by
// a library floating-point adder; its internals here are this design's own.
module fp_add
  import qdsp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        sa, sb, sl, ss, a_inf, b_inf, a_zero, b_zero, swap, sub;
  logic [7:0]  ea, eb, el, es;
  logic [23:0] ml, ms;
  logic [7:0]  d;
  logic [26:0] xl, xs, xs_al;
  logic [27:0] raw;
  logic [26:0] n;
  logic [4:0]  lz;
  logic signed [9:0] e_n;
  logic        rnd;
  logic [24:0] m_r;
  logic signed [9:0] e_r;

  always_comb begin
    sa = a[31]; ea = a[30:23];
    sb = b[31]; eb = b[30:23];
    a_inf  = (ea == 8'hff);
    b_inf  = (eb == 8'hff);
    a_zero = (ea == 8'h00);
    b_zero = (eb == 8'h00);

    swap = (b[30:0] & {8'hff, {23{!b_zero}}}) > (a[30:0] & {8'hff, {23{!a_zero}}});
    sl = swap ? sb : sa;
    ss = swap ? sa : sb;
    el = swap ? eb : ea;
    es = swap ? ea : eb;
    ml = swap ? {!b_zero, b[22:0] & {23{!b_zero}}} : {!a_zero, a[22:0] & {23{!a_zero}}};
    ms = swap ? {!a_zero, a[22:0] & {23{!a_zero}}} : {!b_zero, b[22:0] & {23{!b_zero}}};
    sub = sl ^ ss;

    d  = el - es;
    xl = {ml, 3'b000};
    xs = {ms, 3'b000};
    if (d >= 8'd27)
      xs_al = {26'b0, |xs};
    else
      xs_al = (xs >> d) | 27'(|(xs & ~({27{1'b1}} << d)));

    raw = sub ? {1'b0, xl} - {1'b0, xs_al} : {1'b0, xl} + {1'b0, xs_al};

    lz = 5'd0;
    n  = raw[26:0];
    e_n = 10'(el);
    if (raw[27]) begin
      n   = {raw[27:2], raw[1] | raw[0]};
      e_n = 10'(el) + 10'sd1;
    end else begin
      lz = 5'd27;
      for (int i = 0; i < 27; i++) begin
        if (raw[i]) lz = 5'(26 - i);
      end
      n   = raw[26:0] << lz;
      e_n = 10'(el) - 10'(lz);
    end

    rnd = n[2] && (n[1] || n[0] || n[3]);
    m_r = {1'b0, n[26:3]} + 25'(rnd);
    e_r = e_n + 10'(m_r[24]);

    if ((a_inf && b_inf && (sa != sb)))
      y = FP_QNAN;
    else if (a_inf)
      y = {sa, 31'h7f80_0000};
    else if (b_inf)
      y = {sb, 31'h7f80_0000};
    else if (a_zero && b_zero)
      y = {sa & sb, 31'h0};
    else if (raw == '0)
      y = 32'h0;
    else if (e_r >= 10'sd255)
      y = {sl, 31'h7f80_0000};
    else if (e_r <= 10'sd0)
      y = {sl, 31'h0};
    else
      y = {sl, e_r[7:0], m_r[24] ? m_r[23:1] : m_r[22:0]};
  end

endmodule
