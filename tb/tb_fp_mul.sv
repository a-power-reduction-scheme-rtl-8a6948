// Self-checking testbench of fp_mul. The exact product of two singles fits
// a double, so the reference rounds once. Random operands over the whole
// exponent range (covering overflow and flush to zero) plus directed cases.
module tb_fp_mul;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a, .b, .y);

  task automatic check(logic [31:0] exp_y, string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: %h * %h = %h, expected %h", what, a, b, y, exp_y);
    end
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
      a = rand_f32(1, 254);
      b = (i % 2) ? rand_f32(1, 254) : rand_f32(100, 154);
      check(to_f32(to_real(a) * to_real(b)), "random");
    end
    a = 32'h3fc0_0000; b = 32'h4000_0000; check(32'h4040_0000, "1.5*2");
    a = 32'hbf80_0000; b = 32'h3f80_0000; check(32'hbf80_0000, "-1*1");
    a = 32'h0000_0000; b = 32'hc120_0000; check(32'h8000_0000, "0*-10");
    a = 32'h7f80_0000; b = 32'h0000_0000; check(32'h7fc0_0000, "inf*0");
    a = 32'h7f80_0000; b = 32'hbf80_0000; check(32'hff80_0000, "inf*-1");
    a = 32'h7f00_0000; b = 32'h7f00_0000; check(32'h7f80_0000, "overflow");
    a = 32'h0080_0000; b = 32'h3f00_0000; check(32'h0000_0000, "underflow flushes");
    a = 32'h3f80_0001; b = 32'h3f80_0001; check(32'h3f80_0002, "(1+u)^2 rounds");
    a = 32'h3f80_0800; b = 32'h3f80_0800; check(32'h3f80_1000, "(1+2^-12)^2 ties to even");
    a = 32'h3f80_0800; b = 32'h3f80_1800; check(32'h3f80_2002, "(1+2^-12)(1+3*2^-12) ties up to even");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
