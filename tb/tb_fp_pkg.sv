// Testbench reference arithmetic for IEEE-754 single precision.
//
// Values are carried as double-precision reals, which hold every single
// and every exact product of two singles. to_f32 rounds a real to single
// precision (nearest, ties to even) by looking at the bits of the double, and
// flushes results below the normal range to signed zero, as the hardware
// does. Callers keep sums exact in double by choosing operand ranges.
package tb_fp_pkg;

  function automatic logic [31:0] to_f32(real r);
    logic [63:0] b;
    logic        s, g, st, rnd;
    int          e;
    logic [24:0] m;
    b = $realtobits(r);
    s = b[63];
    if (b[62:0] == '0) return {s, 31'h0};
    e   = int'(b[62:52]) - 1023 + 127;
    m   = {2'b01, b[51:29]};
    g   = b[28];
    st  = |b[27:0];
    rnd = g && (st || m[0]);
    m   = m + 25'(rnd);
    if (m[24]) begin
      e = e + 1;
      m = m >> 1;
    end
    if (e >= 255) return {s, 8'hff, 23'h0};
    if (e <= 0)   return {s, 31'h0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic real to_real(logic [31:0] f);
    logic [63:0] b;
    if (f[30:23] == 8'h00) return f[31] ? -0.0 : 0.0;
    b = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'h0};
    return $bitstoreal(b);
  endfunction

  // A random normal single with exponent field in [lo, hi].
  function automatic logic [31:0] rand_f32(int lo, int hi);
    int e;
    e = lo + int'($urandom_range(hi - lo));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
