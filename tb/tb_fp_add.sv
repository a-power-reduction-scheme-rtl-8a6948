// Self-checking testbench of fp_add. Random operand pairs whose exponents
// differ by at most 28 (so that the exact sum fits a double and the reference
// rounds only once), plus directed cases: exact cancellation, zeros,
// infinities, overflow and a result below the normal range.
module tb_fp_add;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_add dut (.a, .b, .y);

  task automatic check(logic [31:0] exp_y, string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: %h + %h = %h, expected %h", what, a, b, y, exp_y);
    end
  endtask

  task automatic check_ref();
    logic [31:0] e;
    real r;
    r = to_real(a) + to_real(b);
    e = to_f32(r);
    // An exact cancellation of two nonzero operands is +0 in round-to-nearest;
    // a nonzero result below the normal range keeps its sign.
    if (r == 0.0 && a[30:23] != 0 && b[30:23] != 0) e = 32'h0;
    check(e, "random");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int ea, eb;
      ea = 1 + int'($urandom_range(253));
      eb = ea + int'($urandom_range(56)) - 28;
      if (eb < 1) eb = 1;
      if (eb > 254) eb = 254;
      a = {1'($urandom), 8'(ea), 23'($urandom)};
      b = {1'($urandom), 8'(eb), 23'($urandom)};
      if (i % 4 == 0) b = {~a[31], a[30:23], 23'($urandom_range(15)) ^ a[22:0]}; // near cancellation
      check_ref();
    end
    // directed cases
    a = 32'h3f80_0000; b = 32'h3f80_0000; check(32'h4000_0000, "1+1");
    a = 32'h3f80_0000; b = 32'hbf80_0000; check(32'h0000_0000, "1-1");
    a = 32'h4b80_0000; b = 32'h3f80_0000; check(32'h4b80_0000, "2^24+1 ties to even");
    a = 32'h4b80_0000; b = 32'h4040_0000; check(32'h4b80_0002, "2^24+3 rounds up");
    a = 32'h3f80_0000; b = 32'h3380_0000; check(32'h3f80_0000, "1+2^-24 tie");
    a = 32'h0000_0000; b = 32'h4120_0000; check(32'h4120_0000, "0+10");
    a = 32'h8000_0000; b = 32'h8000_0000; check(32'h8000_0000, "-0 + -0");
    a = 32'h7f80_0000; b = 32'h4120_0000; check(32'h7f80_0000, "inf+10");
    a = 32'h7f80_0000; b = 32'hff80_0000; check(32'h7fc0_0000, "inf-inf");
    a = 32'h7f7f_ffff; b = 32'h7f7f_ffff; check(32'h7f80_0000, "overflow");
    a = 32'h00c0_0000; b = 32'h8080_0000; check(32'h0000_0000, "underflow flushes");
    a = 32'h0040_0000; b = 32'h3f80_0000; check(32'h3f80_0000, "subnormal input is zero");
    a = 32'hc120_0000; b = 32'h40a0_0000; check(32'hc0a0_0000, "-10+5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
