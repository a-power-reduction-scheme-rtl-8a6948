// Integration memory: a simple dual-port SRAM, one read and one write port.
//
// DEPTH words of WIDTH bits. A read address given in one clock returns its
// word on rd_data in the next clock (synchronous read). A write happens at
// the clock edge; a read of the word being written in the same clock returns
// the old contents. The contents are not reset. In silicon this would be a
// compiled SRAM macro; here it is a plain array. The word count (1024,
// "1,000 words or more") and the 32-bit word of the modified flow come from
// the source design; the port arrangement is this design's choice.
module int_sram
  import qdsp_pkg::*;
#(
  parameter int unsigned WIDTH = FP_W,
  parameter int unsigned WORDS = DEPTH,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
