// Self-checking testbench of integration. Runs estimations of P passes over
// K words: every pass sends one integer-valued single (|v| < 2^40, so every
// partial sum is exact in a double and the reference rounds once per add)
// to each word; the first pass overwrites, later passes add, the last pass
// must put out round(acc + v) for every word, in order, two clocks after the
// sum entered. Covers sums on consecutive clocks to the same word (bypass),
// sums spread over all 1024 words, and idle clocks between sums.
module tb_integration;
  import qdsp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [31:0] in_re = '0, in_im = '0, out_re, out_im;
  int_tag_t tag_in = '0;
  logic out_valid;
  logic [ADDR_W-1:0] out_addr;
  int checks = 0, failures = 0, outputs = 0, bypasses = 0;

  logic [31:0] acc_re [DEPTH], acc_im [DEPTH];
  logic [31:0] exp_re [$], exp_im [$];
  int          exp_addr [$];
  int          in_cycle [$];
  int          cycle = 0;

  integration dut (.clk, .rst_n, .in_valid, .in_re, .in_im, .tag_in,
                   .out_valid, .out_re, .out_im, .out_addr);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic logic [31:0] rnd_int_f32();
    longint v;
    v = longint'($urandom_range(32'hffff_ffff)) * longint'($urandom_range(255)) - 64'sd549755813888;
    return to_f32(real'(v));
  endfunction

  always @(negedge clk) begin
    if (out_valid) begin
      outputs++;
      checks++;
      if (exp_re.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        logic [31:0] er, ei;
        int ea, ic;
        er = exp_re.pop_front(); ei = exp_im.pop_front(); ea = exp_addr.pop_front(); ic = in_cycle.pop_front();
        if (out_re !== er || out_im !== ei || int'(out_addr) != ea || cycle - ic != 2) begin
          failures++;
          $display("FAIL word %0d: got %h %h @%0d after %0d, expected %h %h @%0d",
                   ea, out_re, out_im, out_addr, cycle - ic, er, ei, ea);
        end
      end
    end
  end

  task automatic send(int k, bit first, bit last, int idle);
    logic [31:0] vr, vi;
    vr = rnd_int_f32(); vi = rnd_int_f32();
    @(negedge clk);
    in_valid = 1; in_re = vr; in_im = vi;
    tag_in = '{addr: ADDR_W'(k), first: first, last: last};
    if (first) begin
      acc_re[k] = vr; acc_im[k] = vi;
    end else begin
      acc_re[k] = to_f32(to_real(acc_re[k]) + to_real(vr));
      acc_im[k] = to_f32(to_real(acc_im[k]) + to_real(vi));
    end
    if (last) begin
      exp_re.push_back(acc_re[k]); exp_im.push_back(acc_im[k]); exp_addr.push_back(k);
      in_cycle.push_back(cycle);
    end
    repeat (idle) begin
      @(negedge clk);
      in_valid = 0;
    end
  endtask

  task automatic estimation(int P, int K, int idle);
    for (int p = 0; p < P; p++)
      for (int k = 0; k < K; k++) begin
        if (k == 0 && p > 0 && K == 1 && idle == 0) bypasses++;
        send(k, p == 0, p == P-1, idle);
      end
    @(negedge clk);
    in_valid = 0;
  endtask

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
    estimation(3, 4, 2);
    estimation(5, 1, 0);       // same word on consecutive clocks
    estimation(4, 2, 0);
    estimation(2, 7, 1);
    estimation(1, 3, 1);       // a single pass puts out the sums themselves
    estimation(2, DEPTH, 0);   // every word
    repeat (5) @(negedge clk);
    checks++;
    if (exp_re.size() != 0 || outputs != 4 + 1 + 2 + 7 + 3 + DEPTH || bypasses == 0) begin
      failures++;
      $display("FAIL %0d outputs, %0d missing", outputs, exp_re.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
