// End-to-end testbench of qubit_dsp_top at its default size.
//
// Loads random small filter coefficients into both filter stages, then
// streams random 16-bit complex samples with sum-section and integration-
// section gates for several estimations, the last of which fills all 1024
// integration words. A reference model computes the filter cascade by direct
// convolution, the sums, the conversion to single precision, the floating-
// point integration (partial sums are integers below 2^53, so a double
// holds them and the reference rounds once per operation) and the
// discriminator d = I - 2Q + 1000. Every integration result and state is
// compared, and so is its latency: 7 clocks from the last sample of the sum
// section to int_valid, 8 to state_valid. The mechanisms of the flow are
// counted and each must occur: coefficient loads in both stages, sums,
// rounding in the converter, first-pass overwrite, accumulation, last-pass
// output, both states, gates outside an integration section, and a
// single-pass estimation.
module tb_qubit_dsp_top;
  import qdsp_pkg::*;
  import tb_fp_pkg::*;

  localparam int MAXN = 20000;

  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] adc_re = '0, adc_im = '0;
  logic sum_sec = 0, int_sec = 0;
  logic coef_we = 0, coef_stage = 0;
  logic [4:0] coef_idx = '0;
  logic signed [COEF_W-1:0] coef_data = '0;
  logic [PASS_W-1:0] n_pass = '0;
  logic [31:0] w_re = 32'h3f80_0000, w_im = 32'hc000_0000, bias = 32'h447a_0000;
  logic int_valid, state_valid, state;
  logic [31:0] int_re, int_im;
  logic [ADDR_W-1:0] int_addr, state_addr;

  qubit_dsp_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // reference model state
  longint c1 [TAPS1], c2 [TAPS2];
  longint xr [MAXN], xi [MAXN], y1r [MAXN], y1i [MAXN];
  int     n = 0;                        // samples sent
  longint sr, si;                       // running sum of the current section
  logic [31:0] accr [DEPTH], acci [DEPTH];
  logic [31:0] q_re [$], q_im [$];
  int          q_addr [$], q_cyc [$];
  logic        q_state [$];
  int          qs_addr [$], qs_cyc [$];

  // mechanism counters
  int m_coef0 = 0, m_coef1 = 0, m_sums = 0, m_round = 0, m_first = 0, m_accum = 0;
  int m_out = 0, m_one = 0, m_zero = 0, m_stray = 0, m_single = 0;

  // Send one sample; computes the filter reference for it.
  task automatic sample(logic s, logic i);
    longint a1r, a1i;
    @(negedge clk);
    adc_re = 16'($urandom); adc_im = 16'($urandom);
    sum_sec = s; int_sec = i;
    xr[n] = longint'(adc_re); xi[n] = longint'(adc_im);
    a1r = 0; a1i = 0;
    for (int j = 0; j < TAPS1; j++)
      if (n - j >= 0) begin a1r += c1[j] * xr[n-j]; a1i += c1[j] * xi[n-j]; end
    y1r[n] = a1r; y1i[n] = a1i;
    n++;
  endtask

  function automatic longint y2(bit im, int m);
    longint a;
    a = 0;
    for (int j = 0; j < TAPS2; j++)
      if (m - j >= 0) a += c2[j] * (im ? y1i[m-j] : y1r[m-j]);
    return a;
  endfunction

  // One estimation: P integration sections of K sum sections of L samples
  // with G-sample gaps; every integration section is preceded by idle
  // samples, some with a stray sum gate.
  task automatic estimation(int P, int K, int L, int G);
    n_pass = PASS_W'(P);
    if (P == 1) m_single++;
    for (int p = 0; p < P; p++) begin
      sample(1, 0); m_stray++;
      sample(0, 0);
      for (int k = 0; k < K; k++) begin
        logic [31:0] fr, fi;
        sr = 0; si = 0;
        for (int l = 0; l < L; l++) begin
          sample(1, 1);
          sr += y2(0, n-1); si += y2(1, n-1);
        end
        fr = to_f32(real'(sr)); fi = to_f32(real'(si));
        if (to_real(fr) != real'(sr) || to_real(fi) != real'(si)) m_round++;
        if (p == 0) begin
          accr[k] = fr; acci[k] = fi;
        end else begin
          accr[k] = to_f32(to_real(accr[k]) + to_real(fr));
          acci[k] = to_f32(to_real(acci[k]) + to_real(fi));
        end
        if (p == P-1) begin
          logic [31:0] t, d;
          q_re.push_back(accr[k]); q_im.push_back(acci[k]); q_addr.push_back(k);
          q_cyc.push_back(cycle + 7);
          t = to_f32(to_real(accr[k]) + to_real(to_f32(-2.0 * to_real(acci[k]))));
          d = to_f32(to_real(t) + 1000.0);
          q_state.push_back(!d[31] && d[30:0] != '0); qs_addr.push_back(k);
          qs_cyc.push_back(cycle + 8);
        end
        for (int g = 0; g < G; g++) sample(0, k < K-1);
      end
    end
    repeat (4) sample(0, 0);
  endtask

  // output monitor
  always @(negedge clk) begin
    if (rst_n && dut.u_integration.s1_valid) begin
      if (dut.u_integration.s1_tag.first) m_first++; else m_accum++;
    end
    if (rst_n && dut.sum_valid) m_sums++;
    if (int_valid) begin
      m_out++;
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
        if (state) m_one++; else m_zero++;
        if (state !== es || int'(state_addr) != ea || cycle != ec) begin
          failures++;
          if (failures < 10)
            $display("FAIL state word %0d: got %b @%0d cycle %0d, expected %b cycle %0d",
                     ea, state, state_addr, cycle, es, ec);
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mech(string name, int count);
    checks++;
    $display("mechanism %-28s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < TAPS1; j++) begin
      c1[j] = longint'($urandom_range(255)) - 128;
      @(negedge clk); coef_we = 1; coef_stage = 0; coef_idx = 5'(j); coef_data = COEF_W'(c1[j]);
      m_coef0++;
    end
    for (int j = 0; j < TAPS2; j++) begin
      c2[j] = longint'($urandom_range(255)) - 128;
      @(negedge clk); coef_we = 1; coef_stage = 1; coef_idx = 5'(j); coef_data = COEF_W'(c2[j]);
      m_coef1++;
    end
    @(negedge clk); coef_we = 0;
    // Samples before the first section feed the filters' tap lines (zero
    // since reset) in the reference too: they are sent through sample().
    estimation(3, 4, 5, 2);
    estimation(1, 3, 2, 1);
    estimation(4, 6, 8, 3);
    estimation(2, DEPTH, 1, 1);
    repeat (12) @(negedge clk);
    checks++;
    if (q_re.size() != 0 || q_state.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", q_re.size());
    end
    mech("coefficient load, stage 1", m_coef0);
    mech("coefficient load, stage 2", m_coef1);
    mech("sum emitted", m_sums);
    mech("conversion rounded", m_round);
    mech("integration first pass", m_first);
    mech("integration accumulate", m_accum);
    mech("integration output", m_out);
    mech("state |1>", m_one);
    mech("state |0>", m_zero);
    mech("gate outside integration", m_stray);
    mech("single-pass estimation", m_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
