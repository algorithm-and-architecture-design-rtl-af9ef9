// recon_buffer: reconstructed pixels of one macroblock, 48 words of 8 pixels
// (the "48x64" reconstructed pixel buffer).
//
// The inverse transform delivers a residual column per clock, so the
// reconstruction writes eight pixels per clock that lie in different words:
// each of the eight write lanes has its own enable, word address and lane
// index. Writes take effect at the clock edge. The whole contents are
// visible on `contents` (the closed-loop neighbours of the next block come
// from here) and rd_addr -> rd_data is a combinational read port for the
// output. The size follows the document; the write organisation is this
// design's own.
module recon_buffer
  import intra_pkg::*;
#(
  parameter int unsigned DEPTH = MB_WORDS
) (
  input  logic                            clk,
  input  logic [7:0]                      wr_en,
  input  logic [7:0][$clog2(DEPTH)-1:0]   wr_word,
  input  logic [7:0][2:0]                 wr_lane,
  input  pix_t [7:0]                      wr_pix,
  input  logic [$clog2(DEPTH)-1:0]        rd_addr,
  output word_t                           rd_data,
  output word_t                           contents [DEPTH]
);

  word_t mem [DEPTH];

  always_ff @(posedge clk)
    for (int p = 0; p < 8; p++)
      if (wr_en[p]) mem[wr_word[p]][wr_lane[p]] <= wr_pix[p];

  assign rd_data  = mem[rd_addr];
  assign contents = mem;

endmodule
