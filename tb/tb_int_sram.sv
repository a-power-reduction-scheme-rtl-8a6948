// Self-checking testbench of int_sram at 1024 x 32: fills every word,
// reads all back with one clock of read latency, and checks that a read
// of the word being written returns the old contents.
module tb_int_sram;
  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [9:0]  rd_addr = '0, wr_addr = '0;
  logic [31:0] rd_data, wr_data = '0;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  int_sram dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(i); wr_data = $urandom; model[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < 1024; i++) begin
      int a;
      a = (i * 389) % 1024;
      @(negedge clk);
      rd_en = 1; rd_addr = 10'(a);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== model[a]) begin
        failures++;
        $display("FAIL word %0d read %h expected %h", a, rd_data, model[a]);
      end
    end
    // read during write of the same word
    @(negedge clk);
    rd_en = 1; rd_addr = 10'd77; wr_en = 1; wr_addr = 10'd77; wr_data = ~model[77];
    @(negedge clk);
    rd_en = 0; wr_en = 0;
    checks++;
    if (rd_data !== model[77]) begin
      failures++;
      $display("FAIL read-during-write returned %h", rd_data);
    end
    model[77] = ~model[77];
    rd_en = 1; rd_addr = 10'd77;
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (rd_data !== model[77]) begin
      failures++;
      $display("FAIL written word reads %h", rd_data);
    end
    // rd_en low holds the output
    rd_addr = 10'd5;
    @(negedge clk);
    checks++;
    if (rd_data !== model[77]) begin
      failures++;
      $display("FAIL output changed without rd_en");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
