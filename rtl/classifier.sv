// Classification: estimates the qubit state from an integrated I/Q value.
//
// A linear discriminator in the I/Q plane: d = w_re * I + w_im * Q + bias,
// computed in single precision (two multipliers, two adders, each rounded to
// nearest even), and the state is |1> when d > 0 and |0> otherwise (a NaN
// gives |0>). The weights and bias are configuration inputs.
//
// Timing: registered output, latency 1 clock, one value per clock. The
// source design only names this block and says it takes single-precision
// input; the discriminator is this design's own choice.
module classifier
  import qdsp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [31:0]       in_re,
  input  logic [31:0]       in_im,
  input  logic [ADDR_W-1:0] in_addr,
  input  logic [31:0]       w_re,
  input  logic [31:0]       w_im,
  input  logic [31:0]       bias,
  output logic              out_valid,
  output logic              state,
  output logic [ADDR_W-1:0] out_addr
);

  logic [31:0] p_re, p_im, s0, d;
  logic        pos;

  fp_mul u_mul_re (.a (w_re), .b (in_re), .y (p_re));
  fp_mul u_mul_im (.a (w_im), .b (in_im), .y (p_im));
  fp_add u_add0   (.a (p_re), .b (p_im),  .y (s0));
  fp_add u_add1   (.a (s0),   .b (bias),  .y (d));

  assign pos = !d[31] && (d[30:0] != '0) && !(d[30:23] == 8'hff && d[22:0] != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      state     <= 1'b0;
      out_addr  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        state    <= pos;
        out_addr <= in_addr;
      end
    end
  end

endmodule
