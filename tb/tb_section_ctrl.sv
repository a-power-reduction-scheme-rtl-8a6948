// Self-checking testbench of section_ctrl. Drives estimations made of
// n_pass integration sections, each holding K sum sections of L samples
// separated by gaps of G samples, and checks every strobe against the gate
// pattern it drove: sum_en on each gated sample, sum_start on the first,
// sum_emit on the clock after the last, and the tag (word k, first and last
// pass) of each emitted sum. Also checks that sum sections outside an
// integration section are ignored and that n_pass = 0 acts as 1.
module tb_section_ctrl;
  import qdsp_pkg::*;

  logic clk = 0, rst_n = 0, sum_sec = 0, int_sec = 0;
  logic [PASS_W-1:0] n_pass = '0;
  logic sum_en, sum_start, sum_emit;
  int_tag_t tag;
  int checks = 0, failures = 0;
  int emits = 0;

  section_ctrl dut (.clk, .rst_n, .sum_sec, .int_sec, .n_pass, .sum_en, .sum_start, .sum_emit, .tag);

  always #5 clk = ~clk;

  task automatic expect_bits(logic en, logic st, logic em, string what);
    checks++;
    if (sum_en !== en || sum_start !== st || sum_emit !== em) begin
      failures++;
      $display("FAIL %s: en/start/emit = %b%b%b, expected %b%b%b", what, sum_en, sum_start, sum_emit, en, st, em);
    end
  endtask

  // One clock of gates; checks the strobes of that clock.
  task automatic drive(logic s, logic i, logic en, logic st, logic em, string what);
    @(negedge clk);
    sum_sec = s;
    int_sec = i;
    #1;
    expect_bits(en, st, em, what);
  endtask

  task automatic estimation(int passes, int K, int L, int G);
    int np;
    np = (passes == 0) ? 1 : passes;
    n_pass = PASS_W'(passes);
    for (int p = 0; p < np; p++) begin
      // idle gap, with a stray sum section outside the integration section
      drive(1, 0, 0, 0, 0, "stray sum gate");
      drive(0, 0, 0, 0, 0, "idle");
      for (int k = 0; k < K; k++) begin
        for (int n = 0; n < L; n++) begin
          drive(1, 1, 1, n == 0, 0, "in sum section");
        end
        for (int n = 0; n < G; n++) begin
          drive(0, (k < K-1) || (n == 0 && G > 1), 0, 0, n == 0, "gap");
          if (n == 0) begin
            emits++;
            checks++;
            if (tag.addr !== ADDR_W'(k) || tag.first !== (p == 0) || tag.last !== (p == np-1)) begin
              failures++;
              $display("FAIL tag pass %0d k %0d: addr %0d first %b last %b", p, k, tag.addr, tag.first, tag.last);
            end
          end
        end
      end
      drive(0, 0, 0, 0, 0, "after");
    end
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
    estimation(3, 4, 3, 2);
    estimation(1, 5, 1, 1);
    estimation(0, 2, 4, 3);
    estimation(2, 1030, 1, 1);   // more sums than words: the word index wraps
    checks++;
    if (emits != 3*4 + 5 + 2 + 2*1030) begin
      failures++;
      $display("FAIL %0d sums emitted", emits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
