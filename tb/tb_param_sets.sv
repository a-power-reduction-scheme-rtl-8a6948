// Workload testbench: random parameter sets with full-width coefficients,
// and a comparison of the floating-point flow with an all-integer one.
//
// For each of NSETS parameter sets the design is reset, loaded with random
// full-range 32-bit coefficients in both filter stages, given random section
// sizes, a random pass count and a random classifier, and fed random
// full-scale samples for one estimation. The reference computes the filters
// and sums as exact wide integers. Every value on the floating-point path is
// integer-valued (weights are powers of two, the bias an integer), so the
// reference keeps each one exact as a 160-bit integer and rounds it to
// single precision once per operation, just as the design must. Every
// integration result and state is checked bit-exactly, with its cycle.
//
// Alongside, an all-integer flow (exact integration, one conversion at the
// end, same classifier) gives its own state for every word; how often it
// agrees with the floating-point flow is counted and printed. This is the
// accuracy question the floating-point conversion raises. Disagreements are
// reported but are not failures: they are a property of the number format,
// not an error of the RTL.
module tb_param_sets;
  import qdsp_pkg::*;
  import tb_fp_pkg::*;

  localparam int NSETS = 125;
  localparam int MAXN  = 4000;
  localparam int XW    = 160;
  typedef logic signed [XW-1:0] wide_t;

  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] adc_re = '0, adc_im = '0;
  logic sum_sec = 0, int_sec = 0;
  logic coef_we = 0, coef_stage = 0;
  logic [4:0] coef_idx = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic [PASS_W-1:0] n_pass = '0;
  logic [31:0] w_re = '0, w_im = '0, bias = '0;
  logic int_valid, state_valid, state;
  logic [31:0] int_re, int_im;
  logic [ADDR_W-1:0] int_addr, state_addr;

  qubit_dsp_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int agree = 0, disagree = 0, rounded_int = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  wide_t c1 [TAPS1], c2 [TAPS2];
  wide_t xr [MAXN], xi [MAXN], y1r [MAXN], y1i [MAXN];
  int    n;
  int    wr_e, wi_e;               // weights are +-2^wr_e, +-2^wi_e
  bit    wr_s, wi_s;
  wide_t bias_i;
  logic [31:0] accr [DEPTH], acci [DEPTH];
  wide_t       intr [DEPTH], inti [DEPTH];
  logic [31:0] q_re [$], q_im [$];
  int          q_addr [$], q_cyc [$];
  logic        q_state [$];
  int          qs_addr [$], qs_cyc [$];

  // Round an exact integer to single precision, nearest even.
  function automatic logic [31:0] wide_to_f32(wide_t v);
    logic [XW-1:0] m;
    int msb;
    logic [24:0] s;
    bit g, st;
    if (v == 0) return 32'h0;
    m = (v < 0) ? -v : v;
    msb = 0;
    for (int i = 0; i < XW; i++) if (m[i]) msb = i;
    if (msb <= 23) return {v < 0, 8'(127 + msb), 23'(m << (23 - msb))};
    s  = 25'(m >> (msb - 23));
    g  = m[msb - 24];
    st = (msb >= 25) ? ((m & ((wide_t'(1) << (msb - 24)) - 1)) != 0) : 1'b0;
    s  = s + 25'(g && (st || s[0]));
    if (s[24]) begin s = s >> 1; msb++; end
    return {v < 0, 8'(127 + msb), s[22:0]};
  endfunction

  // Exact value of an integer-valued single.
  function automatic wide_t f32_to_wide(logic [31:0] f);
    wide_t m;
    int e;
    if (f[30:23] == 0) return 0;
    e = int'(f[30:23]) - 127;
    m = wide_t'({1'b1, f[22:0]});
    m = (e >= 23) ? (m << (e - 23)) : (m >> (23 - e));
    return f[31] ? -m : m;
  endfunction

  function automatic wide_t scale(wide_t v, bit s, int e);
    wide_t r;
    r = v << e;
    return s ? -r : r;
  endfunction

  // Discriminator on integer-valued singles, rounded after every step.
  function automatic logic classify(logic [31:0] fr, logic [31:0] fi);
    logic [31:0] pr, pi, s0, d;
    pr = wide_to_f32(scale(f32_to_wide(fr), wr_s, wr_e));
    pi = wide_to_f32(scale(f32_to_wide(fi), wi_s, wi_e));
    s0 = wide_to_f32(f32_to_wide(pr) + f32_to_wide(pi));
    d  = wide_to_f32(f32_to_wide(s0) + bias_i);
    return !d[31] && d[30:0] != '0;
  endfunction

  task automatic sample(logic s, logic i);
    wide_t ar, ai;
    @(negedge clk);
    adc_re = 16'($urandom); adc_im = 16'($urandom);
    sum_sec = s; int_sec = i;
    xr[n] = wide_t'(adc_re); xi[n] = wide_t'(adc_im);
    ar = 0; ai = 0;
    for (int j = 0; j < TAPS1; j++)
      if (n - j >= 0) begin ar += c1[j] * xr[n-j]; ai += c1[j] * xi[n-j]; end
    y1r[n] = ar; y1i[n] = ai;
    n++;
  endtask

  function automatic wide_t y2(bit im, int m);
    wide_t a;
    a = 0;
    for (int j = 0; j < TAPS2; j++)
      if (m - j >= 0) a += c2[j] * (im ? y1i[m-j] : y1r[m-j]);
    return a;
  endfunction

  task automatic param_set();
    int P, K, L, G;
    P = 1 + int'($urandom_range(5));
    K = 1 + int'($urandom_range(15));
    L = 1 + int'($urandom_range(30));
    G = 1 + int'($urandom_range(3));
    wr_s = 1'($urandom); wi_s = 1'($urandom);
    wr_e = int'($urandom_range(3)); wi_e = int'($urandom_range(3));
    w_re = {wr_s, 8'(127 + wr_e), 23'h0};
    w_im = {wi_s, 8'(127 + wi_e), 23'h0};
    bias_i = f32_to_wide(rand_f32(150, 190));
    bias_i = bias_i >>> $urandom_range(30);    // keep it integer-valued
    bias   = wide_to_f32(bias_i);
    bias_i = f32_to_wide(bias);
    // reset, then load coefficients
    @(negedge clk);
    rst_n = 0;
    adc_re = '0; adc_im = '0;     // the tap lines fill with zeros while loading
    sum_sec = 0; int_sec = 0;
    @(negedge clk);
    rst_n = 1;
    n = 0;
    for (int j = 0; j < TAPS1; j++) begin
      c1[j] = wide_t'($signed($urandom));
      @(negedge clk); coef_we = 1; coef_stage = 0; coef_idx = 5'(j); coef_data = COEF_W'(c1[j]);
    end
    for (int j = 0; j < TAPS2; j++) begin
      c2[j] = wide_t'($signed($urandom));
      @(negedge clk); coef_we = 1; coef_stage = 1; coef_idx = 5'(j); coef_data = COEF_W'(c2[j]);
    end
    @(negedge clk); coef_we = 0;
    n_pass = PASS_W'(P);
    for (int p = 0; p < P; p++) begin
      repeat (2) sample(0, 0);
      for (int k = 0; k < K; k++) begin
        wide_t sr, si;
        logic [31:0] fr, fi;
        sr = 0; si = 0;
        for (int l = 0; l < L; l++) begin
          sample(1, 1);
          sr += y2(0, n-1); si += y2(1, n-1);
        end
        fr = wide_to_f32(sr); fi = wide_to_f32(si);
        if (p == 0) begin
          accr[k] = fr; acci[k] = fi; intr[k] = sr; inti[k] = si;
        end else begin
          accr[k] = wide_to_f32(f32_to_wide(accr[k]) + f32_to_wide(fr));
          acci[k] = wide_to_f32(f32_to_wide(acci[k]) + f32_to_wide(fi));
          intr[k] += sr; inti[k] += si;
        end
        if (p == P-1) begin
          logic s_fp, s_int;
          logic [31:0] ir, ii;
          q_re.push_back(accr[k]); q_im.push_back(acci[k]); q_addr.push_back(k);
          q_cyc.push_back(cycle + 7);
          s_fp = classify(accr[k], acci[k]);
          q_state.push_back(s_fp); qs_addr.push_back(k); qs_cyc.push_back(cycle + 8);
          ir = wide_to_f32(intr[k]); ii = wide_to_f32(inti[k]);
          if (ir != accr[k] || ii != acci[k]) rounded_int++;
          s_int = classify(ir, ii);
          if (s_int == s_fp) agree++; else disagree++;
        end
        for (int g = 0; g < G; g++) sample(0, k < K-1);
      end
    end
    repeat (12) sample(0, 0);
  endtask

  always @(negedge clk) begin
    if (int_valid) begin
      checks++;
      if (q_re.size() == 0) begin
        failures++;
        $display("FAIL unexpected integration output");
      end else begin
        logic [31:0] er, ei;
        int ea, ec;
        er = q_re.pop_front(); ei = q_im.pop_front(); ea = q_addr.pop_front(); ec = q_cyc.pop_front();
        if (int_re !== er || int_im !== ei || int'(int_addr) != ea || cycle != ec) begin
          failures++;
          if (failures < 10)
            $display("FAIL word %0d: got %h %h @%0d cycle %0d, expected %h %h cycle %0d",
                     ea, int_re, int_im, int_addr, cycle, er, ei, ec);
        end
      end
    end
    if (state_valid) begin
      checks++;
      if (q_state.size() == 0) begin
        failures++;
        $display("FAIL unexpected state output");
      end else begin
        logic es;
        int ea, ec;
        es = q_state.pop_front(); ea = qs_addr.pop_front(); ec = qs_cyc.pop_front();
        if (state !== es || int'(state_addr) != ea || cycle != ec) begin
          failures++;
          if (failures < 10)
            $display("FAIL state word %0d: got %b cycle %0d, expected %b cycle %0d", ea, state, cycle, es, ec);
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NSETS; s++) param_set();
    checks++;
    if (q_re.size() != 0 || q_state.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", q_re.size());
    end
    $display("parameter sets %0d, words classified %0d", NSETS, agree + disagree);
    $display("float flow result differs from integer flow result (rounding) in %0d words", rounded_int);
    $display("state agrees with the all-integer flow in %0d words, differs in %0d", agree, disagree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
