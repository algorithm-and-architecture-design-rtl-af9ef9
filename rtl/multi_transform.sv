// multi_transform: reconfigurable 8-pixel-parallel 2-D integer transform.
//
// One instance serves as two 4x4 DCTs side by side (lanes 0..3 and 4..7),
// one 8x8 DCT, two 4x4 IDCTs or one 8x8 IDCT, chosen per block with in_blk8
// and in_inv. It takes one 8-lane row per clock and gives one 8-lane word per
// clock, so an N-row block (N = 4 or 8) occupies N input and N output cycles.
//
// Structure: two N x 8 register buffers used ping-pong. Pass 1 works on the
// incoming words while a block is written into one buffer; pass 2 reads the
// other, full buffer.
//   Forward: pass 1 accumulates the vertical transform as rows arrive
//     (buffer[k] += A[k][r] * row r), pass 2 reads buffer row k and applies
//     the horizontal transform, so coefficients leave row by row (out_idx = k).
//     The 4x4 forward kernel is the H.264 core transform; the 8x8 forward
//     uses the integer kernel of the standard's 8x8 inverse on both passes
//     and divides the result by 64 with rounding.
//   Inverse: pass 1 applies the standard 1-D inverse to each incoming
//     coefficient row (horizontal first, as a decoder does), pass 2 reads
//     buffer column c and applies the vertical 1-D inverse plus the final
//     (x + 32) >> 6, so residuals leave column by column (out_idx = c).
// Because forward output rows can be fed straight back as inverse input rows,
// DCT -> Q -> IQ -> IDCT of one block runs back to back through one instance.
//
// Timing: output word i of a block is registered and appears N + 1 cycles
// after input row i. in_ready is low only when both buffers are occupied;
// with blocks of equal size issued back to back it never drops.
// The document gives the configurations (two 4x4 or one 8x8, DCT or IDCT);
// the buffer organisation and the timing are this design's own.
module multi_transform
  import intra_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_inv,      // 1: inverse transform
  input  logic         in_blk8,     // 1: one 8x8 block, 0: two 4x4 blocks
  input  job_t         in_tag,      // carried to the outputs of this block
  input  coef_t [7:0]  in_data,
  output logic         out_valid,
  output logic [2:0]   out_idx,     // forward: coefficient row; inverse: column
  output logic         out_last,
  output logic         out_inv,
  output logic         out_blk8,
  output job_t         out_tag,
  output coef_t [7:0]  out_data,
  output logic         busy         // a block is held or a word is on the output
);

  int          buffer [2][8][8];
  logic [1:0]  full;
  logic        wsel, rsel;
  logic [2:0]  wrow, ridx;
  logic [1:0]  cfg_inv, cfg_blk8;
  job_t        cfg_tag [2];

  // -------- 1-D kernels -----------------------------------------------
  function automatic void inv4(input int d0, input int d1, input int d2, input int d3,
                               output int x0, output int x1, output int x2, output int x3);
    int e, f, g, h;
    e = d0 + d2;
    f = d0 - d2;
    g = (d1 >>> 1) - d3;
    h = d1 + (d3 >>> 1);
    x0 = e + h; x1 = f + g; x2 = f - g; x3 = e - h;
  endfunction

  function automatic void inv8(input int d [8], output int x [8]);
    int a0, a1, a2, a3, a4, a5, a6, a7;
    int b0, b1, b2, b3, b4, b5, b6, b7;
    a0 = d[0] + d[4];
    a4 = d[0] - d[4];
    a2 = (d[2] >>> 1) - d[6];
    a6 = d[2] + (d[6] >>> 1);
    b0 = a0 + a6; b2 = a4 + a2; b4 = a4 - a2; b6 = a0 - a6;
    a1 = -d[3] + d[5] - d[7] - (d[7] >>> 1);
    a3 =  d[1] + d[7] - d[3] - (d[3] >>> 1);
    a5 = -d[1] + d[7] + d[5] + (d[5] >>> 1);
    a7 =  d[3] + d[5] + d[1] + (d[1] >>> 1);
    b1 = a1 + (a7 >>> 2);
    b7 = a7 - (a1 >>> 2);
    b3 = a3 + (a5 >>> 2);
    b5 = (a3 >>> 2) - a5;
    x[0] = b0 + b7; x[1] = b2 + b5; x[2] = b4 + b3; x[3] = b6 + b1;
    x[4] = b6 - b1; x[5] = b4 - b3; x[6] = b2 - b5; x[7] = b0 - b7;
  endfunction

  // -------- pass 1 --------------------------------------------------------
  assign in_ready = !full[wsel];
  assign busy     = (|full) || out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel     <= 1'b0;
      wrow     <= '0;
      full     <= '0;
      cfg_inv  <= '0;
      cfg_blk8 <= '0;
      cfg_tag  <= '{default: job_t'('0)};
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) buffer[b][r][c] <= 0;
    end else begin
      if (in_valid && in_ready) begin
        int n;
        n = in_blk8 ? 8 : 4;
        if (wrow == 3'd0) begin
          cfg_inv[wsel]  <= in_inv;
          cfg_blk8[wsel] <= in_blk8;
          cfg_tag[wsel]  <= in_tag;
        end
        if (!in_inv) begin
          for (int k = 0; k < 8; k++)
            if (k < n)
              for (int c = 0; c < 8; c++) begin
                int coef;
                coef = in_blk8 ? dct8_k(k, int'(wrow)) : dct4_k(k, int'(wrow));
                buffer[wsel][k][c] <= ((wrow == 3'd0) ? 0 : buffer[wsel][k][c])
                                      + coef * int'(in_data[c]);
              end
        end else begin
          if (in_blk8) begin
            int d [8];
            int x [8];
            for (int c = 0; c < 8; c++) d[c] = int'(in_data[c]);
            inv8(d, x);
            for (int c = 0; c < 8; c++) buffer[wsel][wrow][c] <= x[c];
          end else begin
            int x0, x1, x2, x3, y0, y1, y2, y3;
            inv4(int'(in_data[0]), int'(in_data[1]), int'(in_data[2]), int'(in_data[3]),
                 x0, x1, x2, x3);
            inv4(int'(in_data[4]), int'(in_data[5]), int'(in_data[6]), int'(in_data[7]),
                 y0, y1, y2, y3);
            buffer[wsel][wrow][0] <= x0; buffer[wsel][wrow][1] <= x1;
            buffer[wsel][wrow][2] <= x2; buffer[wsel][wrow][3] <= x3;
            buffer[wsel][wrow][4] <= y0; buffer[wsel][wrow][5] <= y1;
            buffer[wsel][wrow][6] <= y2; buffer[wsel][wrow][7] <= y3;
          end
        end
        if (int'(wrow) == n - 1) begin
          wrow       <= '0;
          full[wsel] <= 1'b1;
          wsel       <= ~wsel;
        end else begin
          wrow <= wrow + 3'd1;
        end
      end
      // pass 2 releases its buffer after the last word
      if (full[rsel] && (int'(ridx) == (cfg_blk8[rsel] ? 7 : 3)))
        full[rsel] <= 1'b0;
    end
  end

  // -------- pass 2 --------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsel      <= 1'b0;
      ridx      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_last  <= 1'b0;
      out_inv   <= 1'b0;
      out_blk8  <= 1'b0;
      out_tag   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (full[rsel]) begin
        int n;
        int res [8];
        n = cfg_blk8[rsel] ? 8 : 4;
        if (!cfg_inv[rsel]) begin
          for (int j = 0; j < 8; j++) begin
            int s;
            s = 0;
            if (cfg_blk8[rsel]) begin
              for (int c = 0; c < 8; c++) s += dct8_k(j, c) * buffer[rsel][ridx][c];
              res[j] = (s + 32) >>> 6;
            end else begin
              for (int c = 0; c < 4; c++)
                s += dct4_k(j % 4, c) * buffer[rsel][ridx][(j / 4) * 4 + c];
              res[j] = s;
            end
          end
        end else begin
          if (cfg_blk8[rsel]) begin
            int d [8];
            int x [8];
            for (int r = 0; r < 8; r++) d[r] = buffer[rsel][r][ridx];
            inv8(d, x);
            for (int r = 0; r < 8; r++) res[r] = (x[r] + 32) >>> 6;
          end else begin
            int x0, x1, x2, x3, y0, y1, y2, y3;
            inv4(buffer[rsel][0][ridx], buffer[rsel][1][ridx],
                 buffer[rsel][2][ridx], buffer[rsel][3][ridx], x0, x1, x2, x3);
            inv4(buffer[rsel][0][ridx + 3'd4], buffer[rsel][1][ridx + 3'd4],
                 buffer[rsel][2][ridx + 3'd4], buffer[rsel][3][ridx + 3'd4], y0, y1, y2, y3);
            res[0] = (x0 + 32) >>> 6; res[1] = (x1 + 32) >>> 6;
            res[2] = (x2 + 32) >>> 6; res[3] = (x3 + 32) >>> 6;
            res[4] = (y0 + 32) >>> 6; res[5] = (y1 + 32) >>> 6;
            res[6] = (y2 + 32) >>> 6; res[7] = (y3 + 32) >>> 6;
          end
        end
        for (int j = 0; j < 8; j++) out_data[j] <= coef_t'(res[j]);
        out_valid <= 1'b1;
        out_idx   <= ridx;
        out_inv   <= cfg_inv[rsel];
        out_blk8  <= cfg_blk8[rsel];
        out_tag   <= cfg_tag[rsel];
        if (int'(ridx) == n - 1) begin
          out_last <= 1'b1;
          ridx     <= '0;
          rsel     <= ~rsel;
        end else begin
          ridx <= ridx + 3'd1;
        end
      end
    end
  end

endmodule
