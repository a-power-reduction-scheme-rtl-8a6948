// Self-checking testbench of sum_unit at its 89 -> 101-bit default widths.
// Random full-width samples are summed over sections of random length (up
// to 4096 samples, the longest that cannot overflow); the reference sum is
// kept in a wider variable. Checks the value, the tag and that out_valid is
// a single pulse one clock after sum_emit.
module tb_sum_unit;
  import qdsp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [FLT_W-1:0] in_re = '0, in_im = '0;
  logic sum_en = 0, sum_start = 0, sum_emit = 0;
  int_tag_t tag_in = '0, tag_out;
  logic out_valid;
  logic signed [SUM_W-1:0] sum_re, sum_im;
  int checks = 0, failures = 0;

  sum_unit dut (.clk, .rst_n, .in_re, .in_im, .sum_en, .sum_start, .sum_emit, .tag_in,
                .out_valid, .sum_re, .sum_im, .tag_out);

  always #5 clk = ~clk;

  function automatic logic signed [FLT_W-1:0] rnd89(bit extreme);
    logic [95:0] r;
    r = {$urandom, $urandom, $urandom};
    if (extreme) return r[0] ? {1'b1, {(FLT_W-1){1'b0}}} : {1'b0, {(FLT_W-1){1'b1}}};
    return r[FLT_W-1:0];
  endfunction

  task automatic section(int len, bit extreme);
    logic signed [SUM_W+7:0] ref_re, ref_im;
    int_tag_t t;
    ref_re = '0; ref_im = '0;
    for (int n = 0; n < len; n++) begin
      @(negedge clk);
      sum_en = 1; sum_start = (n == 0); sum_emit = 0;
      in_re = rnd89(extreme); in_im = rnd89(1'b0);
      ref_re += (SUM_W+8)'(in_re);
      ref_im += (SUM_W+8)'(in_im);
    end
    @(negedge clk);
    t = '{addr: ADDR_W'($urandom), first: 1'($urandom), last: 1'($urandom)};
    sum_en = 0; sum_start = 0; sum_emit = 1; tag_in = t;
    in_re = rnd89(0);  // not in a section: must be ignored
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid early");
    end
    @(negedge clk);
    sum_emit = 0;
    checks++;
    if (!out_valid || sum_re !== SUM_W'(ref_re) || sum_im !== SUM_W'(ref_im) || tag_out !== t) begin
      failures++;
      $display("FAIL len %0d: got %h %h, expected %h %h", len, sum_re, sum_im, SUM_W'(ref_re), SUM_W'(ref_im));
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid longer than one clock");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    section(1, 0);
    section(2, 0);
    for (int i = 0; i < 40; i++) section(1 + int'($urandom_range(200)), 0);
    section(4096, 1);   // extreme values for the longest section
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
