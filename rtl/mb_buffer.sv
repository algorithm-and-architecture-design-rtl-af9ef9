// mb_buffer: one macroblock of pixels, 48 words of 8 pixels (the "48x64"
// buffers of the architecture: current MB buffer and MC data buffer).
//
// Layout (see intra_pkg): words 0..31 luma, two per row; 32..39 U rows;
// 40..47 V rows. The buffer is written one word per clock from outside
// (wr_en / wr_addr / wr_data, written at the clock edge) and read in two
// ways: a combinational read port rd_addr -> rd_data for a single word,
// and the whole contents on `contents`, which the predictor assigner and the
// difference stage use to pick any pixel without a read cycle. A register
// array is used for that reason; the document gives the size (48 x 64 bits)
// but not the organisation.
module mb_buffer
  import intra_pkg::*;
#(
  parameter int unsigned DEPTH = MB_WORDS
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [$clog2(DEPTH)-1:0]  wr_addr,
  input  word_t                     wr_data,
  input  logic [$clog2(DEPTH)-1:0]  rd_addr,
  output word_t                     rd_data,
  output word_t                     contents [DEPTH]
);

  word_t mem [DEPTH];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr] <= wr_data;

  assign rd_data  = mem[rd_addr];
  assign contents = mem;

endmodule
