// Sum: adds the successive filtered samples of one sum section.
//
// Both components are accumulated in full precision, 89-bit samples into a
// 101-bit accumulator (up to 4096 samples per section without overflow). The
// accumulator loads the sample on sum_start and adds it on every other
// sum_en clock. On sum_emit the finished sum is registered on sum_re/sum_im
// with out_valid and the tag that came with the strobe.
//
// Timing: out_valid is high for one clock, the clock after sum_emit. Widths
// follow the source design; the strobe interface is this design's own.
module sum_unit
  import qdsp_pkg::*;
#(
  parameter int unsigned IN_W  = FLT_W,
  parameter int unsigned OUT_W = SUM_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  input  logic                    sum_en,
  input  logic                    sum_start,
  input  logic                    sum_emit,
  input  int_tag_t                tag_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] sum_re,
  output logic signed [OUT_W-1:0] sum_im,
  output int_tag_t                tag_out
);

  logic signed [OUT_W-1:0] acc_re, acc_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re <= '0;
      acc_im <= '0;
    end else if (sum_en) begin
      acc_re <= (sum_start ? '0 : acc_re) + OUT_W'(in_re);
      acc_im <= (sum_start ? '0 : acc_im) + OUT_W'(in_im);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum_re    <= '0;
      sum_im    <= '0;
      tag_out   <= '0;
    end else begin
      out_valid <= sum_emit;
      if (sum_emit) begin
        sum_re  <= acc_re;
        sum_im  <= acc_im;
        tag_out <= tag_in;
      end
    end
  end

endmodule
