// tb_frame_workload: a small picture encoded macroblock by macroblock in
// raster order, as the engine runs in a real encoder, to check the per-MB
// cycle budget behind the frame rates it is meant for (1080p at 223 MHz,
// 720p at 98 MHz, D1 at 37 MHz, 30 frames/s: 911, 907 and 913 clocks per MB
// are available, so every MB must finish within 906).
//
// The picture is 4 x 3 macroblocks of a synthetic scene (smooth shading, a
// diagonal edge and a textured area), generated here. The testbench plays
// the part of the external upper-row store: the reconstructed bottom row of
// the MB row above and the availability flags are presented for each MB,
// while the left neighbour column is kept inside the engine. Every MB is
// decoded independently from the chosen modes and levels and must match the
// engine's reconstruction pixel for pixel; the mean reconstruction error must
// stay small; total and worst cycle counts are reported. Three QPs are run.
module tb_frame_workload;
  import intra_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cur_wr_en = 0, mc_wr_en = 0;
  logic [5:0]  cur_wr_addr = 0, mc_wr_addr = 0;
  word_t       cur_wr_data = '0, mc_wr_data = '0;
  pix_t        up_luma [25];
  pix_t [7:0]  up_u, up_v;
  logic        mb_top = 0, mb_left = 0, mb_topleft = 0, mb_topright = 0;
  logic        start = 0, inter = 0;
  logic [5:0]  qp = 6'd24;
  logic        busy, done, mb_i8;
  logic [3:0]  best4 [16];
  logic [3:0]  best8 [4];
  logic [3:0]  best_uv;
  logic [23:0] cost_i4, cost_i8, cost_uv;
  logic [5:0]  rec_rd_addr = 0, coef_rd_addr = 0;
  word_t       rec_rd_data;
  coef_t [7:0] coef_rd_data;

  intra_top dut (.*);

  int checks = 0, failures = 0;
  int n_i4 = 0, n_i8 = 0, n_inter = 0, n_stall = 0, n_reject = 0;
  int total_cyc = 0, worst_cyc = 0;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) begin
    if (dut.issue && !dut.tx_ready && !dut.feedback) n_stall++;
    if (dut.tx_ov && !dut.tx_otag.recon && dut.tx_olast &&
        (!dut.tx_otag.ok_lo || !dut.tx_otag.ok_hi)) n_reject++;
  end

  // ---------------- source and reference data ------------------------------
  int src  [3][16][16];    // [0] luma, [1] U, [2] V (chroma uses 8x8)
  int mc   [3][16][16];
  int rec  [3][16][16];    // decoder reference of the current MB
  int prevrec [3][16][16]; // decoder reference of the previous MB
  int up   [3][-1:23];     // reconstructed row above (index -1 = corner)
  int lvl  [3][16][16];    // levels read back from the engine

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // ---------------- decoder model -----------------------------------------
  int  dq_v4 [6][3] = '{'{10,16,13},'{11,18,14},'{13,20,16},'{14,23,18},'{16,25,20},'{18,29,23}};
  int  dq_v8 [6][6] = '{'{20,18,32,19,25,24},'{22,19,35,21,28,26},'{26,23,42,24,33,31},
                        '{28,25,45,26,35,33},'{32,28,51,30,40,38},'{36,32,58,34,46,43}};
  int  qpc_tab [22] = '{29,30,31,32,32,33,34,34,35,35,36,36,37,37,37,38,38,38,39,39,39,39};

  function automatic int qp_for(int c, int q);
    if (c == 0 || q < 30) return q;
    return qpc_tab[q - 30];
  endfunction

  function automatic int scale4(int q, int i, int j);
    int k;
    k = (i % 2 == 0 && j % 2 == 0) ? 0 : ((i % 2 == 1 && j % 2 == 1) ? 1 : 2);
    return 16 * dq_v4[q % 6][k];
  endfunction

  function automatic int scale8(int q, int i, int j);
    int k;
    if (i % 4 == 0 && j % 4 == 0)      k = 0;
    else if (i % 2 == 1 && j % 2 == 1) k = 1;
    else if (i % 4 == 2 && j % 4 == 2) k = 2;
    else if ((i % 4 == 0 && j % 2 == 1) || (i % 2 == 1 && j % 4 == 0)) k = 3;
    else if ((i % 4 == 0 && j % 4 == 2) || (i % 4 == 2 && j % 4 == 0)) k = 4;
    else k = 5;
    return 16 * dq_v8[q % 6][k];
  endfunction

  // chroma DC: when dc_ovr is set, residual() uses dc_val as the scaled
  // (0,0) coefficient instead of dequantising the level there
  bit dc_ovr = 0;
  int dc_val = 0;

  // residual of an n x n block at (x0,y0) of component c
  task automatic residual(input int c, input int x0, input int y0, input int n,
                          input int q, output int res [8][8]);
    int d [8][8];
    int t [8][8];
    int v [8];
    int o [8];
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        longint s;
        if (n == 4) begin
          s = (longint'(lvl[c][y0 + i][x0 + j]) * scale4(q, i, j)) <<< (q / 6);
          s = (s + 8) >>> 4;
        end else begin
          s = (longint'(lvl[c][y0 + i][x0 + j]) * scale8(q, i, j)) <<< (q / 6);
          s = (s + 32) >>> 6;
        end
        d[i][j] = int'(s);
      end
    if (dc_ovr) d[0][0] = dc_val;
    // rows, then columns
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < n; a++) begin
        for (int b = 0; b < n; b++) v[b] = (pass == 0) ? d[a][b] : t[b][a];
        if (n == 4) begin
          int e, f, g, h;
          e = v[0] + v[2]; f = v[0] - v[2];
          g = (v[1] >>> 1) - v[3]; h = v[1] + (v[3] >>> 1);
          o[0] = e + h; o[1] = f + g; o[2] = f - g; o[3] = e - h;
        end else begin
          int e0, e2, e4, e6, f0, f2, f4, f6, g1, g3, g5, g7, h1, h3, h5, h7;
          e0 = v[0] + v[4]; e4 = v[0] - v[4];
          e2 = (v[2] >>> 1) - v[6]; e6 = v[2] + (v[6] >>> 1);
          f0 = e0 + e6; f2 = e4 + e2; f4 = e4 - e2; f6 = e0 - e6;
          g1 = -v[3] + v[5] - v[7] - (v[7] >>> 1);
          g3 = v[1] + v[7] - v[3] - (v[3] >>> 1);
          g5 = -v[1] + v[7] + v[5] + (v[5] >>> 1);
          g7 = v[3] + v[5] + v[1] + (v[1] >>> 1);
          h1 = g1 + (g7 >>> 2); h7 = g7 - (g1 >>> 2);
          h3 = g3 + (g5 >>> 2); h5 = (g3 >>> 2) - g5;
          o[0] = f0 + h7; o[1] = f2 + h5; o[2] = f4 + h3; o[3] = f6 + h1;
          o[4] = f6 - h1; o[5] = f4 - h3; o[6] = f2 - h5; o[7] = f0 - h7;
        end
        for (int b = 0; b < n; b++)
          if (pass == 0) t[a][b] = o[b];
          else res[b][a] = (o[b] + 32) >>> 6;
      end
    end
  endtask

  // decoded-pixel map of the luma of the current MB
  bit decoded [16][16];
  bit f_top, f_left, f_tl, f_tr;

  function automatic bit lavail(int x, int y);
    if (y < 0) return (x < 0) ? f_tl : ((x < 16) ? f_top : f_tr);
    if (x < 0) return f_left;
    if (x >= 16) return 0;
    return decoded[y][x];
  endfunction

  function automatic int lpix(int x, int y);
    if (y < 0) return up[0][x];
    if (x < 0) return prevrec[0][y][15];
    return rec[0][y][x];
  endfunction

  // luma intra prediction of an n x n block, modes as in the standard
  task automatic luma_pred(input int x0, input int y0, input int n, input int m,
                           output int pr [8][8], output bit ok);
    int P [-1:15];   // p[x,-1] at P[x] (P[-1] = corner)
    int L [-1:7];    // p[-1,y] at L[y] (L[-1] = corner)
    bit at, al, ac, atr;
    at  = lavail(x0, y0 - 1);
    al  = lavail(x0 - 1, y0);
    ac  = lavail(x0 - 1, y0 - 1);
    atr = lavail(x0 + n, y0 - 1);
    for (int i = -1; i < 2 * n; i++)
      P[i] = (i >= n && !atr) ? lpix(x0 + n - 1, y0 - 1) : lpix(x0 + i, y0 - 1);
    for (int j = -1; j < n; j++) L[j] = lpix(x0 - 1, y0 + j);
    if (n == 8) begin
      int FP [-1:15];
      int FL [-1:7];
      FP = P; FL = L;
      if (at) begin
        FP[0] = ac ? (P[-1] + 2 * P[0] + P[1] + 2) >> 2 : (3 * P[0] + P[1] + 2) >> 2;
        for (int i = 1; i < 15; i++) FP[i] = (P[i - 1] + 2 * P[i] + P[i + 1] + 2) >> 2;
        FP[15] = (P[14] + 3 * P[15] + 2) >> 2;
      end
      if (ac) begin
        if (at && al) FP[-1] = (P[0] + 2 * P[-1] + L[0] + 2) >> 2;
        else if (at)  FP[-1] = (3 * P[-1] + P[0] + 2) >> 2;
        else if (al)  FP[-1] = (3 * P[-1] + L[0] + 2) >> 2;
      end
      if (al) begin
        FL[0] = ac ? (P[-1] + 2 * L[0] + L[1] + 2) >> 2 : (3 * L[0] + L[1] + 2) >> 2;
        for (int j = 1; j < 7; j++) FL[j] = (L[j - 1] + 2 * L[j] + L[j + 1] + 2) >> 2;
        FL[7] = (L[6] + 3 * L[7] + 2) >> 2;
      end
      FL[-1] = FP[-1];
      P = FP; L = FL;
    end
    case (m)
      0, 3, 7: ok = at;
      1, 8:    ok = al;
      2:       ok = 1;
      default: ok = at && al && ac;
    endcase
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        int v, z, s;
        case (m)
          0: v = P[x];
          1: v = L[y];
          2: begin
            s = 0;
            if (at && al) begin
              for (int i = 0; i < n; i++) s += P[i] + L[i];
              v = (s + n) / (2 * n);
            end else if (at || al) begin
              for (int i = 0; i < n; i++) s += at ? P[i] : L[i];
              v = (s + n / 2) / n;
            end else v = 128;
          end
          3: v = (x == n - 1 && y == n - 1) ? (P[2 * n - 2] + 3 * P[2 * n - 1] + 2) >> 2
                 : (P[x + y] + 2 * P[x + y + 1] + P[x + y + 2] + 2) >> 2;
          4: v = (x > y) ? (P[x - y - 2] + 2 * P[x - y - 1] + P[x - y] + 2) >> 2
                 : (x < y) ? (L[y - x - 2] + 2 * L[y - x - 1] + L[y - x] + 2) >> 2
                 : (P[0] + 2 * P[-1] + L[0] + 2) >> 2;
          5: begin
            z = 2 * x - y;
            if (z >= 0 && z % 2 == 0) v = (P[x - (y >> 1) - 1] + P[x - (y >> 1)] + 1) >> 1;
            else if (z >= 0) v = (P[x - (y >> 1) - 2] + 2 * P[x - (y >> 1) - 1] + P[x - (y >> 1)] + 2) >> 2;
            else if (z == -1) v = (L[0] + 2 * L[-1] + P[0] + 2) >> 2;
            else v = (L[y - 2 * x - 1] + 2 * L[y - 2 * x - 2] + L[y - 2 * x - 3] + 2) >> 2;
          end
          6: begin
            z = 2 * y - x;
            if (z >= 0 && z % 2 == 0) v = (L[y - (x >> 1) - 1] + L[y - (x >> 1)] + 1) >> 1;
            else if (z >= 0) v = (L[y - (x >> 1) - 2] + 2 * L[y - (x >> 1) - 1] + L[y - (x >> 1)] + 2) >> 2;
            else if (z == -1) v = (L[0] + 2 * L[-1] + P[0] + 2) >> 2;
            else v = (P[x - 2 * y - 1] + 2 * P[x - 2 * y - 2] + P[x - 2 * y - 3] + 2) >> 2;
          end
          7: v = (y % 2 == 0) ? (P[x + (y >> 1)] + P[x + (y >> 1) + 1] + 1) >> 1
                 : (P[x + (y >> 1)] + 2 * P[x + (y >> 1) + 1] + P[x + (y >> 1) + 2] + 2) >> 2;
          default: begin
            z = x + 2 * y;
            if (z > 2 * n - 3) v = L[n - 1];
            else if (z == 2 * n - 3) v = (L[n - 2] + 3 * L[n - 1] + 2) >> 2;
            else if (z % 2 == 0) v = (L[y + (x >> 1)] + L[y + (x >> 1) + 1] + 1) >> 1;
            else v = (L[y + (x >> 1)] + 2 * L[y + (x >> 1) + 1] + L[y + (x >> 1) + 2] + 2) >> 2;
          end
        endcase
        pr[y][x] = v;
      end
  endtask

  task automatic chroma_pred(input int c, input int m, output int pr [8][8]);
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        int st, sl, xo, yo;
        bit ut, ul;
        xo = (x / 4) * 4; yo = (y / 4) * 4;
        st = 0; sl = 0;
        for (int i = 0; i < 4; i++) begin
          st += up[c][xo + i];
          sl += prevrec[c][yo + i][7];
        end
        if (xo == yo)     begin ut = f_top; ul = f_left; end
        else if (yo == 0) begin ut = f_top; ul = !f_top && f_left; end
        else              begin ul = f_left; ut = !f_left && f_top; end
        case (m)
          1: pr[y][x] = prevrec[c][y][7];
          2: pr[y][x] = up[c][x];
          default: pr[y][x] = (ut && ul) ? (st + sl + 4) >> 3 : ut ? (st + 2) >> 2
                              : ul ? (sl + 2) >> 2 : 128;
        endcase
      end
  endtask

  task automatic decode_mb(input bit is_inter, input bit i8, input int q);
    int pr [8][8];
    int rs [8][8];
    bit ok;
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) decoded[y][x] = 0;
    if (is_inter || i8) begin
      for (int b = 0; b < 4; b++) begin
        int x0, y0;
        x0 = (b % 2) * 8; y0 = (b / 2) * 8;
        if (is_inter) begin
          for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) pr[y][x] = mc[0][y0 + y][x0 + x];
        end else begin
          luma_pred(x0, y0, 8, int'(best8[b]), pr, ok);
          checks++;
          if (!ok) begin failures++; $display("FAIL unusable 8x8 mode %0d blk %0d", best8[b], b); end
        end
        residual(0, x0, y0, 8, q, rs);
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++) begin
            rec[0][y0 + y][x0 + x] = clip(pr[y][x] + rs[y][x]);
            decoded[y0 + y][x0 + x] = 1;
          end
      end
    end else begin
      for (int n = 0; n < 16; n++) begin
        int x0, y0;
        x0 = ((n >> 2) & 1) * 8 + (n & 1) * 4;
        y0 = ((n >> 3) & 1) * 8 + ((n >> 1) & 1) * 4;
        luma_pred(x0, y0, 4, int'(best4[n]), pr, ok);
        checks++;
        if (!ok) begin failures++; $display("FAIL unusable 4x4 mode %0d blk %0d", best4[n], n); end
        residual(0, x0, y0, 4, q, rs);
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) begin
            rec[0][y0 + y][x0 + x] = clip(pr[y][x] + rs[y][x]);
            decoded[y0 + y][x0 + x] = 1;
          end
      end
    end
    for (int c = 1; c < 3; c++) begin
      int cp [8][8];
      int cdc [4];
      if (is_inter) begin
        for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) cp[y][x] = mc[c][y][x];
      end else begin
        chroma_pred(c, int'(best_uv), cp);
      end
      // 2x2 chroma DC: inverse Hadamard of the four DC levels, then scaling
      cdc[0] = lvl[c][0][0] + lvl[c][0][4] + lvl[c][4][0] + lvl[c][4][4];
      cdc[1] = lvl[c][0][0] - lvl[c][0][4] + lvl[c][4][0] - lvl[c][4][4];
      cdc[2] = lvl[c][0][0] + lvl[c][0][4] - lvl[c][4][0] - lvl[c][4][4];
      cdc[3] = lvl[c][0][0] - lvl[c][0][4] - lvl[c][4][0] + lvl[c][4][4];
      for (int b = 0; b < 4; b++) begin
        int x0, y0, qc;
        x0 = (b % 2) * 4; y0 = (b / 2) * 4;
        qc = qp_for(c, q);
        dc_ovr = 1;
        dc_val = ((cdc[b] * 16 * dq_v4[qc % 6][0]) <<< (qc / 6)) >>> 5;
        residual(c, x0, y0, 4, qc, rs);
        dc_ovr = 0;
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++)
            rec[c][y0 + y][x0 + x] = clip(cp[y0 + y][x0 + x] + rs[y][x]);
      end
    end
  endtask

  // ---------------- stimulus ------------------------------------------------
  // picture: luma 64 x 48, chroma 32 x 24 (index [c][y][x])
  localparam int MBW = 4, MBH = 3;
  int pic    [3][48][64];
  int recpic [3][48][64];
  int cur_x0, cur_y0;

  function automatic int scene(int c, int y, int x);
    int v;
    v = 40 + 2 * x + y + 20 * c;                                         // shading
    if (x + 2 * y > 70) v += 60;                                         // edge
    if (c == 0 && y > 24 && x < 30) v += ((x * 7 + y * 13) % 23) - 11;   // texture
    return clip(v);
  endfunction

  // copy the current MB out of the picture; row above from the reconstruction
  task automatic make_mb(input int kind, input int seed);
    for (int c = 0; c < 3; c++) begin
      int sh, n;
      sh = (c == 0) ? 0 : 1;
      n  = 16 >> sh;
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++) begin
          src[c][y][x] = pic[c][(cur_y0 >> sh) + y][(cur_x0 >> sh) + x];
          mc[c][y][x]  = src[c][y][x];
        end
      for (int x = -1; x < 24; x++) begin
        int px;
        px = (cur_x0 >> sh) + x;
        if (px < 0) px = 0;
        if (px > (64 >> sh) - 1) px = (64 >> sh) - 1;
        up[c][x] = (cur_y0 > 0) ? recpic[c][(cur_y0 >> sh) - 1][px] : 0;
      end
    end
  endtask

  task automatic load_mb();
    for (int w = 0; w < 48; w++) begin
      word_t d, m;
      for (int l = 0; l < 8; l++) begin
        if (w < 32) begin
          d[l] = pix_t'(src[0][w / 2][(w % 2) * 8 + l]);
          m[l] = pix_t'(mc[0][w / 2][(w % 2) * 8 + l]);
        end else begin
          d[l] = pix_t'(src[1 + (w - 32) / 8][(w - 32) % 8][l]);
          m[l] = pix_t'(mc[1 + (w - 32) / 8][(w - 32) % 8][l]);
        end
      end
      @(negedge clk);
      cur_wr_en = 1; cur_wr_addr = 6'(w); cur_wr_data = d;
      mc_wr_en  = 1; mc_wr_addr  = 6'(w); mc_wr_data  = m;
    end
    @(negedge clk);
    cur_wr_en = 0; mc_wr_en = 0;
    for (int x = -1; x < 24; x++) up_luma[x + 1] = pix_t'(up[0][x]);
    for (int x = 0; x < 8; x++) begin
      up_u[x] = pix_t'(up[1][x]);
      up_v[x] = pix_t'(up[2][x]);
    end
  endtask

  task automatic run_mb(input int kind, input int seed, input bit is_inter, input int q,
                        input bit t, input bit l, input bit tl, input bit tr,
                        input int err_limit, input int expect_i8);
    int cyc;
    int err;
    make_mb(kind, seed);
    load_mb();
    mb_top = t; mb_left = l; mb_topleft = tl; mb_topright = tr;
    f_top = t; f_left = l; f_tl = tl; f_tr = tr;
    qp = 6'(q); inter = is_inter;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    // read back levels
    for (int w = 0; w < 48; w++) begin
      coef_rd_addr = 6'(w);
      #1;
      for (int ln = 0; ln < 8; ln++)
        if (w < 32) lvl[0][w / 2][(w % 2) * 8 + ln] = int'(coef_rd_data[ln]);
        else lvl[1 + (w - 32) / 8][(w - 32) % 8][ln] = int'(coef_rd_data[ln]);
    end
    decode_mb(is_inter, mb_i8, q);
    // compare reconstruction
    err = 0;
    for (int w = 0; w < 48; w++) begin
      rec_rd_addr = 6'(w);
      #1;
      for (int ln = 0; ln < 8; ln++) begin
        int c, y, x, e;
        if (w < 32) begin c = 0; y = w / 2; x = (w % 2) * 8 + ln; end
        else begin c = 1 + (w - 32) / 8; y = (w - 32) % 8; x = ln; end
        checks++;
        if (int'(rec_rd_data[ln]) != rec[c][y][x]) begin
          failures++;
          if (failures < 10)
            $display("FAIL recon c%0d (%0d,%0d): dut %0d ref %0d", c, x, y, rec_rd_data[ln], rec[c][y][x]);
        end
        e = rec[c][y][x] - src[c][y][x];
        err += (e < 0) ? -e : e;
      end
    end
    checks++;
    if (err > err_limit * 384) begin
      failures++;
      $display("FAIL mean reconstruction error %0d/384 above %0d", err, err_limit);
    end
    // cycle budget: the document quotes under 906 cycles per MB
    checks++;
    if (cyc > 906) begin
      failures++;
      $display("FAIL %0d cycles for one MB", cyc);
    end
    if (expect_i8 >= 0) begin
      checks++;
      if (int'(mb_i8) != expect_i8) begin
        failures++;
        $display("FAIL MB type: i8=%0d expected %0d (cost4 %0d cost8 %0d)", mb_i8, expect_i8,
                 cost_i4, cost_i8);
      end
    end
    if (is_inter) n_inter++;
    else if (mb_i8) n_i8++;
    else n_i4++;
    $display("MB kind=%0d inter=%0d i8=%0d cycles=%0d cost4=%0d cost8=%0d uv=%0d err=%0d",
             kind, is_inter, mb_i8, cyc, cost_i4, cost_i8, best_uv, err);
    prevrec = rec;
    total_cyc += cyc;
    if (cyc > worst_cyc) worst_cyc = cyc;
    for (int c = 0; c < 3; c++) begin
      int n, sh;
      sh = (c == 0) ? 0 : 1;
      n = 16 >> sh;
      for (int y = 0; y < n; y++) for (int x = 0; x < n; x++)
        recpic[c][(cur_y0 >> sh) + y][(cur_x0 >> sh) + x] = rec[c][y][x];
    end
  endtask

  int qps [3] = '{22, 30, 38};

  initial begin
    for (int c = 0; c < 3; c++) for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++)
      prevrec[c][y][x] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3; c++)
      for (int y = 0; y < (c == 0 ? 48 : 24); y++)
        for (int x = 0; x < (c == 0 ? 64 : 32); x++)
          pic[c][y][x] = scene(c, c == 0 ? y : 2 * y, c == 0 ? x : 2 * x);
    foreach (qps[i]) begin
      for (int my = 0; my < MBH; my++)
        for (int mx = 0; mx < MBW; mx++) begin
          cur_x0 = 16 * mx;
          cur_y0 = 16 * my;
          run_mb(0, 0, 0, qps[i], my > 0, mx > 0, my > 0 && mx > 0, my > 0 && mx < MBW - 1,
                 qps[i] / 3, -1);
        end
      $display("QP %0d: %0d MBs, %0d cycles, worst MB %0d, mean %0d per MB",
               qps[i], MBW * MBH, total_cyc, worst_cyc, total_cyc / (MBW * MBH));
      total_cyc = 0;
      worst_cyc = 0;
    end
    $display("Intra_4x4 MBs %0d, Intra_8x8 MBs %0d", n_i4, n_i8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
