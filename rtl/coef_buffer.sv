// coef_buffer: quantised levels of one macroblock, 48 words of 8 x 16 bits
// (the "48x64x2" coefficient buffer between the quantiser and the entropy
// coder).
//
// Levels are stored in the same spatial layout as the pixels (see
// intra_pkg): the level of coefficient (i,j) of a 4x4 or 8x8 block sits where
// pixel (i,j) of that block sits. Each of the eight write lanes has its own
// enable, word and lane, because in Intra_4x4 reconstruction one quantiser
// row holds a luma and a chroma block that live in different words. Writes
// take effect at the clock edge; the read port rd_addr -> rd_data is
// combinational, for the entropy coder. The size follows the document; the layout is this design's.
module coef_buffer
  import intra_pkg::*;
#(
  parameter int unsigned DEPTH = MB_WORDS
) (
  input  logic                          clk,
  input  logic [7:0]                     wr_en,
  input  logic [7:0][$clog2(DEPTH)-1:0]  wr_word,
  input  logic [7:0][2:0]                wr_lane,
  input  coef_t [7:0]                    wr_data,
  input  logic [$clog2(DEPTH)-1:0]  rd_addr,
  output coef_t [7:0]               rd_data
);

  coef_t [7:0] mem [DEPTH];

  always_ff @(posedge clk)
    for (int p = 0; p < 8; p++)
      if (wr_en[p]) mem[wr_word[p]][wr_lane[p]] <= wr_data[p];

  assign rd_data = mem[rd_addr];

endmodule
