// Integration: floating-point accumulation of sums across integration
// sections.
//
// Every sum arrives as a complex single-precision value with a tag naming
// its SRAM word (its position within the integration section) and whether it
// belongs to the first or last integration section of the estimation. The
// word is read, the sum is added to it with a floating-point adder and the
// result is written back; on the first pass the sum is written as it is. On
// the last pass the result is also put out on out_re/out_im with its word
// address. I and Q have one 1024 x 32-bit SRAM and one adder each.
//
// Timing: a two-stage read-modify-write. Clock 0: the sum is accepted and the
// word read. Clock 1: add and write back; out_valid follows one clock later
// (latency 2). One sum per clock is accepted; a sum to the word written in
// the clock before is served from a bypass register. The structure (adder
// feeding an SRAM that feeds it back) and the 32-bit floating-point words
// follow the source design; the pipeline and bypass are this design's own.
module integration
  import qdsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_re,
  input  logic [31:0] in_im,
  input  int_tag_t    tag_in,
  output logic        out_valid,
  output logic [31:0] out_re,
  output logic [31:0] out_im,
  output logic [ADDR_W-1:0] out_addr
);

  // Stage 1 registers: the sum whose word is being read.
  logic        s1_valid;
  logic [31:0] s1_re, s1_im;
  int_tag_t    s1_tag;
  // Bypass: the word written in the previous clock.
  logic        byp_hit;
  logic [31:0] byp_re, byp_im;

  logic [31:0] rd_re, rd_im, old_re, old_im, add_re, add_im, acc_re, acc_im;
  logic        wr_en;

  assign wr_en = s1_valid;

  int_sram u_sram_re (
    .clk, .rd_en (in_valid), .rd_addr (tag_in.addr), .rd_data (rd_re),
    .wr_en, .wr_addr (s1_tag.addr), .wr_data (acc_re)
  );
  int_sram u_sram_im (
    .clk, .rd_en (in_valid), .rd_addr (tag_in.addr), .rd_data (rd_im),
    .wr_en, .wr_addr (s1_tag.addr), .wr_data (acc_im)
  );

  assign old_re = byp_hit ? byp_re : rd_re;
  assign old_im = byp_hit ? byp_im : rd_im;

  fp_add u_add_re (.a (old_re), .b (s1_re), .y (add_re));
  fp_add u_add_im (.a (old_im), .b (s1_im), .y (add_im));

  assign acc_re = s1_tag.first ? s1_re : add_re;
  assign acc_im = s1_tag.first ? s1_im : add_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_re     <= '0;
      s1_im     <= '0;
      s1_tag    <= '0;
      byp_hit   <= 1'b0;
      byp_re    <= '0;
      byp_im    <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_addr  <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_re  <= in_re;
        s1_im  <= in_im;
        s1_tag <= tag_in;
      end
      byp_hit <= in_valid && s1_valid && (tag_in.addr == s1_tag.addr);
      byp_re  <= acc_re;
      byp_im  <= acc_im;
      out_valid <= s1_valid && s1_tag.last;
      if (s1_valid && s1_tag.last) begin
        out_re   <= acc_re;
        out_im   <= acc_im;
        out_addr <= s1_tag.addr;
      end
    end
  end

endmodule
