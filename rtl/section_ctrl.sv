// Section control: turns the sum-section and integration-section gates into
// the strobes of the sum unit and the tag of every sum.
//
// A sum section is the run of samples for which both gates are high. The
// first sample of a run raises sum_start, every sample of it raises sum_en,
// and the clock after its last sample raises sum_emit. The k-th sum section
// of an integration section is tagged with SRAM word k (k restarts at each
// rising edge of int_sec). Integration sections are counted; one estimation
// spans n_pass of them (0 is taken as 1). The tag's first/last bits mark the
// first and last integration section of the estimation, so integration can
// overwrite its word on the first pass and report it on the last.
//
// Timing: strobes are combinational in the current gates and the registered
// previous ones; the tag is valid with sum_emit. The two-gate scheme follows
// the timing chart of the source design; the strobes, the tag and the pass
// count are this design's own choice.
module section_ctrl
  import qdsp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sum_sec,
  input  logic              int_sec,
  input  logic [PASS_W-1:0] n_pass,
  output logic              sum_en,
  output logic              sum_start,
  output logic              sum_emit,
  output int_tag_t          tag
);

  logic              prev_en, prev_int;
  logic [ADDR_W-1:0] k;
  logic [PASS_W-1:0] pass, last_pass;

  assign last_pass = (n_pass == '0) ? '0 : n_pass - 1'b1;
  assign sum_en    = sum_sec && int_sec;
  assign sum_start = sum_en && !prev_en;
  assign sum_emit  = prev_en && !sum_en;

  assign tag.addr  = k;
  assign tag.first = (pass == '0);
  assign tag.last  = (pass == last_pass);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_en  <= 1'b0;
      prev_int <= 1'b0;
      k        <= '0;
      pass     <= '0;
    end else begin
      prev_en  <= sum_en;
      prev_int <= int_sec;
      if (int_sec && !prev_int)   k <= '0;
      else if (sum_emit)          k <= k + 1'b1;
      if (prev_int && !int_sec)   pass <= (pass >= last_pass) ? '0 : pass + 1'b1;
    end
  end

endmodule
