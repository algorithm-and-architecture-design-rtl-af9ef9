// predictor_assigner: gathers the boundary (neighbour) pixels of the luma
// block(s) of the current job for the luma predictor.
//
// Open-loop prediction stage (job.recon = 0): neighbours inside the
// macroblock are taken from the ORIGINAL pixels of the current MB buffer,
// while neighbours outside it (the row above from the upper-row store, the
// column to the left from the previous MB) are reconstructed pixels, as the
// document proposes (Sec. 3.3, Fig. 6). This lets every sub-block be
// predicted without waiting for the reconstruction of its neighbours.
// Reconstruction stage (job.recon = 1): neighbours inside the MB come from
// the reconstructed pixel buffer instead (closed loop).
//
// For an Intra_4x4 prediction job the two 4x4 blocks of a pair (blocks 2p
// and 2p+1 of Fig. 2(a), side by side) get one neighbour set each (nb_lo,
// nb_hi); for an Intra_4x4 reconstruction job only nb_lo is used. For an
// Intra_8x8 job nb_lo carries the 8x8 neighbours after the standard's
// [1 2 1] reference sample filter. Availability follows the H.264 decoding
// order rules (above-right of blocks 3, 7, 11, 13, 15 and of 8x8 block 3 is
// never available and is replaced by the last pixel above); the MB-level
// flags come from outside. The block is purely combinational.
module predictor_assigner
  import intra_pkg::*;
(
  input  job_t   job,
  input  word_t  orig  [48],       // current MB buffer
  input  word_t  recon [48],       // reconstructed pixel buffer
  input  pix_t   up    [25],       // row above the MB, x = -1 .. 23 (reconstructed)
  input  pix_t   lf    [16],       // column left of the MB, y = 0 .. 15 (reconstructed)
  input  logic   mb_top, mb_left, mb_topleft, mb_topright,
  output nbr_t   nb_lo,
  output nbr_t   nb_hi
);

  function automatic pix_t px(int x, int y, logic use_rec);
    if (y < 0)  return up[x + 1];
    if (x < 0)  return lf[y];
    if (use_rec) return recon[y * 2 + x / 8][x % 8];
    return orig[y * 2 + x / 8][x % 8];
  endfunction

  // Unfiltered neighbours of the n x n block at (x0, y0)
  function automatic nbr_t gather(int x0, int y0, int n, logic use_rec);
    nbr_t r;
    logic a_tr;
    r = '0;
    r.a_top  = (y0 > 0) || mb_top;
    r.a_left = (x0 > 0) || mb_left;
    if (x0 > 0 && y0 > 0)       r.a_corner = 1'b1;
    else if (y0 == 0 && x0 > 0) r.a_corner = mb_top;
    else if (y0 == 0)           r.a_corner = mb_topleft;
    else                        r.a_corner = mb_left;
    if (y0 == 0)               a_tr = (x0 + n < 16) ? mb_top : mb_topright;
    else if (x0 + n >= 16)     a_tr = 1'b0;
    else if (n == 4)           a_tr = !((x0 % 8 == 4) && (y0 % 8 == 4));
    else                       a_tr = 1'b1;
    r.top[0] = px(x0 - 1, y0 - 1, use_rec);
    for (int i = 0; i < 16; i++)
      if (i < 2 * n)
        r.top[1 + i] = (i < n || a_tr) ? px(x0 + i, y0 - 1, use_rec)
                                       : px(x0 + n - 1, y0 - 1, use_rec);
    for (int j = 0; j < 8; j++)
      if (j < n) r.left[j] = px(x0 - 1, y0 + j, use_rec);
    return r;
  endfunction

  // Reference sample filtering of Intra_8x8 prediction
  function automatic nbr_t filter8(nbr_t p);
    nbr_t f;
    f = p;
    if (p.a_top) begin
      if (p.a_corner)
        f.top[1] = pix_t'((int'(p.top[0]) + 2 * int'(p.top[1]) + int'(p.top[2]) + 2) >> 2);
      else
        f.top[1] = pix_t'((3 * int'(p.top[1]) + int'(p.top[2]) + 2) >> 2);
      for (int x = 1; x < 15; x++)
        f.top[1 + x] = pix_t'((int'(p.top[x]) + 2 * int'(p.top[1 + x])
                               + int'(p.top[2 + x]) + 2) >> 2);
      f.top[16] = pix_t'((int'(p.top[15]) + 3 * int'(p.top[16]) + 2) >> 2);
    end
    if (p.a_corner) begin
      if (p.a_top && p.a_left)
        f.top[0] = pix_t'((int'(p.top[1]) + 2 * int'(p.top[0]) + int'(p.left[0]) + 2) >> 2);
      else if (p.a_top)
        f.top[0] = pix_t'((3 * int'(p.top[0]) + int'(p.top[1]) + 2) >> 2);
      else if (p.a_left)
        f.top[0] = pix_t'((3 * int'(p.top[0]) + int'(p.left[0]) + 2) >> 2);
    end
    if (p.a_left) begin
      if (p.a_corner)
        f.left[0] = pix_t'((int'(p.top[0]) + 2 * int'(p.left[0]) + int'(p.left[1]) + 2) >> 2);
      else
        f.left[0] = pix_t'((3 * int'(p.left[0]) + int'(p.left[1]) + 2) >> 2);
      for (int y = 1; y < 7; y++)
        f.left[y] = pix_t'((int'(p.left[y - 1]) + 2 * int'(p.left[y])
                            + int'(p.left[y + 1]) + 2) >> 2);
      f.left[7] = pix_t'((int'(p.left[6]) + 3 * int'(p.left[7]) + 2) >> 2);
    end
    return f;
  endfunction

  always_comb begin
    int x0, y0;
    x0 = 0;
    y0 = 0;
    nb_lo = '0;
    nb_hi = '0;
    case (job.kind)
      JOB_I8: begin
        x0 = job.blk[0] ? 8 : 0;
        y0 = job.blk[1] ? 8 : 0;
        nb_lo = filter8(gather(x0, y0, 8, job.recon));
      end
      JOB_I4: begin
        if (job.recon) begin
          nb_lo = gather(int'(blk4_x(job.blk)), int'(blk4_y(job.blk)), 4, 1'b1);
        end else begin
          nb_lo = gather(int'(blk4_x({job.blk[2:0], 1'b0})),
                         int'(blk4_y({job.blk[2:0], 1'b0})), 4, 1'b0);
          nb_hi = gather(int'(blk4_x({job.blk[2:0], 1'b1})),
                         int'(blk4_y({job.blk[2:0], 1'b1})), 4, 1'b0);
        end
      end
      default: ;
    endcase
  end

endmodule
