// Self-checking testbench of classifier. Inputs, weights and bias are
// singles with exponents within a narrow window, so each product is exact in
// a double and each sum of two singles is too; the reference rounds after
// every operation, as the hardware does, and the expected state is d > 0.
// Also checks directed points on either side of a simple threshold, the
// address and the one-clock latency.
module tb_classifier;
  import qdsp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, state;
  logic [31:0] in_re = '0, in_im = '0, w_re = '0, w_im = '0, bias = '0;
  logic [ADDR_W-1:0] in_addr = '0, out_addr;
  int checks = 0, failures = 0, ones = 0, zeros = 0;

  classifier dut (.clk, .rst_n, .in_valid, .in_re, .in_im, .in_addr, .w_re, .w_im, .bias,
                  .out_valid, .state, .out_addr);

  always #5 clk = ~clk;

  task automatic classify(logic [31:0] r, logic [31:0] i, logic exp_state);
    logic [ADDR_W-1:0] a;
    a = ADDR_W'($urandom);
    @(negedge clk);
    in_valid = 1; in_re = r; in_im = i; in_addr = a;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (exp_state) ones++; else zeros++;
    if (!out_valid || state !== exp_state || out_addr !== a) begin
      failures++;
      $display("FAIL (%h, %h) w %h %h b %h: state %b, expected %b", r, i, w_re, w_im, bias, state, exp_state);
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
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] r, i, pr, pi, s0, d;
      w_re = rand_f32(124, 130); w_im = rand_f32(124, 130); bias = rand_f32(130, 142);
      r = rand_f32(124, 136); i = rand_f32(124, 136);
      pr = to_f32(to_real(w_re) * to_real(r));
      pi = to_f32(to_real(w_im) * to_real(i));
      s0 = to_f32(to_real(pr) + to_real(pi));
      d  = to_f32(to_real(s0) + to_real(bias));
      classify(r, i, !d[31] && d[30:0] != '0);
    end
    // state |1> when I > 100: w = (1, 0), bias = -100
    w_re = 32'h3f80_0000; w_im = 32'h0; bias = 32'hc2c8_0000;
    classify(32'h42ca_0000, 32'h4700_0000, 1'b1);   // I = 101
    classify(32'h42c6_0000, 32'hc700_0000, 1'b0);   // I = 99
    classify(32'h42c8_0000, 32'h0, 1'b0);           // I = 100: d = 0 gives |0>
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
