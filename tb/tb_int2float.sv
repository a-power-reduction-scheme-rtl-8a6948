// Self-checking testbench of int2float at its 101-bit default width.
// Random inputs are m * 2^s with m a random signed integer of up to 53 bits,
// so their value is exact in a double and the reference rounds once; plus
// directed cases at the ends of the range and on rounding ties. Checks the
// one-clock latency.
module tb_int2float;
  import tb_fp_pkg::*;

  localparam int W = 101;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [W-1:0] in_int = '0;
  logic [31:0] out_fp;
  int checks = 0, failures = 0;

  int2float dut (.clk, .rst_n, .in_valid, .in_int, .out_valid, .out_fp);

  always #5 clk = ~clk;

  task automatic convert(logic signed [W-1:0] v, logic [31:0] exp_f, string what);
    @(negedge clk);
    in_valid = 1;
    in_int   = v;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || out_fp !== exp_f) begin
      failures++;
      $display("FAIL %s: %h -> %h (valid %0b), expected %h", what, v, out_fp, out_valid, exp_f);
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
    for (int i = 0; i < 5000; i++) begin
      longint m;
      int     nb, s;
      nb = 1 + int'($urandom_range(52));
      m  = longint'({$urandom, $urandom}) >>> (64 - nb);  // signed, nb bits
      s  = int'($urandom_range(W - 1 - nb));
      convert(W'(m) <<< s, to_f32(real'(m) * (2.0 ** s)), "random");
    end
    convert('0, 32'h0, "zero");
    convert(W'(1), 32'h3f80_0000, "one");
    convert(-W'(1), 32'hbf80_0000, "minus one");
    convert(W'(16777217), 32'h4b80_0000, "2^24+1 ties to even");
    convert(W'(16777219), 32'h4b80_0002, "2^24+3 rounds up");
    convert({1'b1, {(W-1){1'b0}}}, 32'hf180_0000, "-2^100");
    convert({1'b0, {(W-1){1'b1}}}, 32'h7180_0000, "2^100-1 rounds up");
    // No conversion leaves out_valid low.
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid without input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
