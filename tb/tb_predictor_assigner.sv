// tb_predictor_assigner: neighbour gathering for every luma job kind.
// A random macroblock of original and of reconstructed pixels, a random row
// above and column to the left, and random MB availability flags are set up;
// for every Intra_4x4 pair (open loop, original pixels inside the MB), every
// single Intra_4x4 block (closed loop, reconstructed pixels) and every 8x8
// block (both loops, with the reference sample filter) the neighbour sets are
// compared with a model that decides availability from the decoding order of
// the blocks and filters the samples as the standard writes it.
module tb_predictor_assigner;
  import intra_pkg::*;

  job_t  job;
  word_t orig [48], recon [48];
  pix_t  up [25], lf [16];
  logic  mb_top, mb_left, mb_topleft, mb_topright;
  nbr_t  nb_lo, nb_hi;
  int checks = 0, failures = 0;

  predictor_assigner dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decoding-order index of the 4x4 block holding luma pixel (x, y)
  function automatic int z4(int x, int y);
    return (y / 8) * 8 + (x / 8) * 4 + ((y % 8) / 4) * 2 + (x % 8) / 4;
  endfunction

  // is pixel (x, y), relative to the MB, available to the n x n block at (x0, y0)
  function automatic bit avail(int x, int y, int x0, int y0, int n);
    if (y < 0 && x < 0) return mb_topleft;
    if (y < 0 && x >= 16) return mb_topright;
    if (y < 0) return mb_top;
    if (x < 0) return mb_left;
    if (x >= 16) return 0;
    if (n == 8) return (y / 8) * 2 + x / 8 < (y0 / 8) * 2 + x0 / 8;
    return z4(x, y) < z4(x0, y0);
  endfunction

  function automatic int pix(int x, int y, bit rec);
    if (y < 0) return up[x + 1];
    if (x < 0) return lf[y];
    return rec ? recon[2 * y + x / 8][x % 8] : orig[2 * y + x / 8][x % 8];
  endfunction

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s kind=%0d blk=%0d recon=%0d", what, job.kind, job.blk, job.recon);
    end
  endtask

  // expected neighbours of the block at (x0, y0), compared with `got`
  task automatic check_set(nbr_t got, int x0, int y0, int n, bit rec, bit filt);
    bit at, al, ac, atr;
    int T [-1:15];      // p[x,-1]
    int L [-1:7];       // p[-1,y], L[-1] = corner
    int FT [-1:15], FL [0:7];
    at  = avail(x0, y0 - 1, x0, y0, n);
    al  = avail(x0 - 1, y0, x0, y0, n);
    ac  = avail(x0 - 1, y0 - 1, x0, y0, n);
    atr = avail(x0 + n, y0 - 1, x0, y0, n);
    chk(got.a_top == at, "a_top");
    chk(got.a_left == al, "a_left");
    chk(got.a_corner == ac, "a_corner");
    for (int i = -1; i < 2 * n; i++)
      T[i] = (i >= n && !atr) ? pix(x0 + n - 1, y0 - 1, rec) : pix(x0 + i, y0 - 1, rec);
    for (int j = 0; j < n; j++) L[j] = pix(x0 - 1, y0 + j, rec);
    L[-1] = T[-1];
    if (filt) begin
      for (int i = -1; i < 16; i++) FT[i] = T[i];
      for (int j = 0; j < 8; j++) FL[j] = L[j];
      if (at) begin
        FT[0] = ac ? (T[-1] + 2 * T[0] + T[1] + 2) >> 2 : (3 * T[0] + T[1] + 2) >> 2;
        for (int i = 1; i < 15; i++) FT[i] = (T[i - 1] + 2 * T[i] + T[i + 1] + 2) >> 2;
        FT[15] = (T[14] + 3 * T[15] + 2) >> 2;
      end
      if (ac) begin
        if (at && al) FT[-1] = (T[0] + 2 * T[-1] + L[0] + 2) >> 2;
        else if (at)  FT[-1] = (3 * T[-1] + T[0] + 2) >> 2;
        else if (al)  FT[-1] = (3 * T[-1] + L[0] + 2) >> 2;
      end
      if (al) begin
        FL[0] = ac ? (L[-1] + 2 * L[0] + L[1] + 2) >> 2 : (3 * L[0] + L[1] + 2) >> 2;
        for (int j = 1; j < 7; j++) FL[j] = (L[j - 1] + 2 * L[j] + L[j + 1] + 2) >> 2;
        FL[7] = (L[6] + 3 * L[7] + 2) >> 2;
      end
      for (int i = -1; i < 16; i++) T[i] = FT[i];
      for (int j = 0; j < 8; j++) L[j] = FL[j];
    end
    if (ac) chk(int'(got.top[0]) == T[-1], "corner");
    if (at) for (int i = 0; i < 2 * n; i++) chk(int'(got.top[1 + i]) == T[i], "top");
    if (al) for (int j = 0; j < n; j++) chk(int'(got.left[j]) == L[j], "left");
  endtask

  initial begin
    for (int it = 0; it < 64; it++) begin
      for (int w = 0; w < 48; w++) begin
        orig[w]  = word_t'({$urandom, $urandom});
        recon[w] = word_t'({$urandom, $urandom});
      end
      for (int i = 0; i < 25; i++) up[i] = pix_t'($urandom);
      for (int i = 0; i < 16; i++) lf[i] = pix_t'($urandom);
      {mb_top, mb_left, mb_topleft, mb_topright} = it < 16 ? 4'(it) : 4'($urandom);
      job = '0;
      // Intra_4x4 prediction: pairs of blocks, original pixels
      job.kind = JOB_I4;
      for (int p = 0; p < 8; p++) begin
        job.blk = 4'(p);
        #1;
        check_set(nb_lo, int'(blk4_x(4'(2 * p))), int'(blk4_y(4'(2 * p))), 4, 0, 0);
        check_set(nb_hi, int'(blk4_x(4'(2 * p + 1))), int'(blk4_y(4'(2 * p + 1))), 4, 0, 0);
      end
      // Intra_4x4 reconstruction: one block, reconstructed pixels
      job.recon = 1;
      for (int b = 0; b < 16; b++) begin
        job.blk = 4'(b);
        #1;
        check_set(nb_lo, int'(blk4_x(4'(b))), int'(blk4_y(4'(b))), 4, 1, 0);
      end
      // Intra_8x8 in both stages
      job.kind = JOB_I8;
      for (int rc = 0; rc < 2; rc++)
        for (int b = 0; b < 4; b++) begin
          job.recon = 1'(rc);
          job.blk = 4'(b);
          #1;
          check_set(nb_lo, (b % 2) * 8, (b / 2) * 8, 8, 1'(rc), 1);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
