// tb_uv_dc_buffer: the chroma DC path. Random chroma pixels, MC data,
// neighbours, availability, chroma mode, QP and intra/inter selection are
// applied; after a capture clock the eight DC levels and dequantised DC
// values are compared with a model built from the definitions: block sums
// of the residual (the DC output of the 4x4 core transform), the 2x2
// Hadamard transform, the reference encoder's DC quantiser and the
// standard's chroma DC scaling. The registers must hold their values while
// capture is low.
module tb_uv_dc_buffer;
  import intra_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic        rst_n = 0, capture = 0, inter = 0, a_top = 0, a_left = 0;
  logic [5:0]  qp = 0;
  word_t       cur [48], mc [48];
  logic [3:0]  mode = 0;
  pix_t [7:0]  up_u, up_v, lf_u, lf_v;
  coef_t       dc_level [8], dc_coef [8];
  int checks = 0, failures = 0;

  uv_dc_buffer dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int qpc_tab [22] = '{29,30,31,32,32,33,34,34,35,35,36,36,37,37,37,38,38,38,39,39,39,39};
  int mf0 [6] = '{13107, 11916, 10082, 9362, 8192, 7282};
  int v0  [6] = '{10, 11, 13, 14, 16, 18};

  // chroma prediction of pixel (x, y) of component c
  function automatic int cpred(int c, int x, int y);
    int st, sl, q;
    pix_t [7:0] t, l;
    t = c ? up_v : up_u;
    l = c ? lf_v : lf_u;
    if (mode == 1) return l[y];
    if (mode == 2) return t[x];
    st = 0; sl = 0;
    for (int i = 0; i < 4; i++) begin
      st += t[(x / 4) * 4 + i];
      sl += l[(y / 4) * 4 + i];
    end
    q = (x / 4) + 2 * (y / 4);
    if (q == 1) return a_top ? (st + 2) >> 2 : a_left ? (sl + 2) >> 2 : 128;
    if (q == 2) return a_left ? (sl + 2) >> 2 : a_top ? (st + 2) >> 2 : 128;
    if (a_top && a_left) return (st + sl + 4) >> 3;
    if (a_top) return (st + 2) >> 2;
    if (a_left) return (sl + 2) >> 2;
    return 128;
  endfunction

  int exp_l [8], exp_c [8];

  task automatic model();
    int qc, qbits, off;
    qc = (qp < 30) ? int'(qp) : qpc_tab[qp - 30];
    qbits = 15 + qc / 6;
    off = inter ? (1 << qbits) / 6 : (1 << qbits) / 3;
    for (int c = 0; c < 2; c++) begin
      int d [4], f [4], l [4], g [4];
      for (int b = 0; b < 4; b++) begin
        d[b] = 0;
        for (int y = (b / 2) * 4; y < (b / 2) * 4 + 4; y++)
          for (int x = (b % 2) * 4; x < (b % 2) * 4 + 4; x++)
            d[b] += int'(cur[32 + 8 * c + y][x])
                    - (inter ? int'(mc[32 + 8 * c + y][x]) : cpred(c, x, y));
      end
      f[0] = d[0] + d[1] + d[2] + d[3];
      f[1] = d[0] - d[1] + d[2] - d[3];
      f[2] = d[0] + d[1] - d[2] - d[3];
      f[3] = d[0] - d[1] - d[2] + d[3];
      for (int b = 0; b < 4; b++) begin
        longint a;
        a = f[b] < 0 ? -f[b] : f[b];
        a = (a * mf0[qc % 6] + 2 * off) >> (qbits + 1);
        l[b] = f[b] < 0 ? -int'(a) : int'(a);
      end
      g[0] = l[0] + l[1] + l[2] + l[3];
      g[1] = l[0] - l[1] + l[2] - l[3];
      g[2] = l[0] + l[1] - l[2] - l[3];
      g[3] = l[0] - l[1] - l[2] + l[3];
      for (int b = 0; b < 4; b++) begin
        exp_l[4 * c + b] = l[b];
        exp_c[4 * c + b] = ((g[b] * 16 * v0[qc % 6]) <<< (qc / 6)) >>> 5;
      end
    end
  endtask

  initial begin
    for (int w = 0; w < 48; w++) begin cur[w] = '0; mc[w] = '0; end
    up_u = '0; up_v = '0; lf_u = '0; lf_v = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      for (int w = 32; w < 48; w++) begin
        int smooth;
        smooth = it % 4;
        cur[w] = word_t'({$urandom, $urandom});
        mc[w]  = word_t'({$urandom, $urandom});
        if (smooth == 0) for (int l = 0; l < 8; l++) begin
          // near-flat blocks so that small DC values and zero levels occur
          cur[w][l] = pix_t'(100 + $urandom % 5);
          mc[w][l]  = pix_t'(100 + $urandom % 5);
        end
      end
      for (int i = 0; i < 8; i++) begin
        up_u[i] = pix_t'($urandom); up_v[i] = pix_t'($urandom);
        lf_u[i] = pix_t'($urandom); lf_v[i] = pix_t'($urandom);
        if (it % 4 == 0) begin
          up_u[i] = 100; up_v[i] = 101; lf_u[i] = 102; lf_v[i] = 103;
        end
      end
      a_top = 1'($urandom); a_left = 1'($urandom);
      mode = 4'($urandom % 3);
      inter = 1'($urandom % 4 == 0);
      qp = 6'($urandom % 52);
      model();
      capture = 1;
      @(negedge clk);
      capture = 0;
      // change the inputs: the registers must not follow
      qp = qp ^ 6'd7;
      @(negedge clk);
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int'(dc_level[k]) != exp_l[k]) begin
          failures++;
          if (failures < 10) $display("FAIL level %0d: %0d expected %0d", k, dc_level[k], exp_l[k]);
        end
        checks++;
        if (int'(dc_coef[k]) != exp_c[k]) begin
          failures++;
          if (failures < 10) $display("FAIL coef %0d: %0d expected %0d", k, dc_coef[k], exp_c[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
