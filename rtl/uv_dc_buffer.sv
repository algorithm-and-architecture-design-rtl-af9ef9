// uv_dc_buffer: chroma DC path. Computes the DC coefficients of the eight
// chroma 4x4 blocks, passes them through the 2x2 Hadamard transform,
// quantises and dequantises them, and holds the results for the
// reconstruction stage.
//
// In H.264 the DC coefficients of the four 4x4 blocks of a chroma component
// are transformed again by a 2x2 Hadamard transform and quantised together,
// so no chroma block can be quantised before the DC terms of all four are
// known. Chroma prediction needs no pixels from inside the MB, so here the
// four DC terms of each component are worked out at once, at the moment the
// chroma mode is fixed. The DC term of the 4x4 forward core transform is
// the sum of the block's 16 residuals. So each DC term is the sum of the
// original pixels minus the sum of the predicted ones. The predicted ones
// come from the chosen intra chroma mode, or from the MC data for an inter
// MB.
//
// Per component, with c the 2x2 array of DC terms (block order 0 1 / 2 3):
//   f     = H c H,  H = [1 1; 1 -1]
//   level = sign(f) * ((|f| * MF(QPc%6, 0) + 2 * offset) >> (16 + QPc/6)),
//           with offset = 2^(15 + QPc/6) / 3 (intra) or / 6 (inter)
//   dcC   = ((H level H) * 16 * V(QPc%6, 0) << QPc/6) >> 5
// as in the standard's decoder and the reference encoder. QPc is the chroma
// QP. dc_level and dc_coef are registered when `capture` is high:
//   - at the decision clock for intra MBs, when best_uv is known;
//   - at start for inter MBs.
// During reconstruction the datapath substitutes them for the DC position's
// level (coefficient buffer) and dequantised value (inverse transform input).
//
// Index k = component * 4 + block, with U = 0 and V = 1.
// The architecture names a UV DC buffer; its organisation and the moment of
// computation are this design's own.
module uv_dc_buffer
  import intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        capture,
  input  logic        inter,        // use MC data as the prediction
  input  logic [5:0]  qp,           // luma QP (chroma QP derived)
  input  word_t       cur [48],     // current MB buffer
  input  word_t       mc  [48],     // MC data buffer
  input  logic [3:0]  mode,         // chosen chroma mode (intra)
  input  pix_t [7:0]  up_u,
  input  pix_t [7:0]  up_v,
  input  pix_t [7:0]  lf_u,
  input  pix_t [7:0]  lf_v,
  input  logic        a_top,
  input  logic        a_left,
  output coef_t       dc_level [8],
  output coef_t       dc_coef  [8]
);

  // intra chroma prediction of every row of both components
  pix_t [7:0] pr [2][8];
  logic       ok_unused [2][8];

  for (genvar c = 0; c < 2; c++) begin : g_comp
    for (genvar r = 0; r < 8; r++) begin : g_row
      chroma_predictor u_cp (.mode, .row(3'(r)), .top(c ? up_v : up_u), .left(c ? lf_v : lf_u),
                             .a_top, .a_left, .pred(pr[c][r]), .ok(ok_unused[c][r]));
    end
  end

  function automatic int hq(int f, int unsigned qm, int unsigned qd, logic is_inter);
    longint mag, off, res;
    mag = (f < 0) ? -longint'(f) : longint'(f);
    off = is_inter ? (64'd1 << (15 + qd)) / 6 : (64'd1 << (15 + qd)) / 3;
    res = (mag * longint'(mf4(qm, 0)) + 2 * off) >> (16 + qd);
    return (f < 0) ? -int'(res) : int'(res);
  endfunction

  function automatic coef_t sat16(longint v);
    if (v > 32767)  return 16'sd32767;
    if (v < -32768) return -16'sd32768;
    return coef_t'(v);
  endfunction

  coef_t lvl_n [8], dcc_n [8];

  always_comb begin
    int unsigned qc, qm, qd;
    qc = int'(chroma_qp(qp));
    qm = qc % 6;
    qd = qc / 6;
    for (int c = 0; c < 2; c++) begin
      int d [4];
      int f [4];
      int l [4];
      int g [4];
      for (int b = 0; b < 4; b++) begin
        int s;
        s = 0;
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) begin
            int yy, xx;
            yy = (b / 2) * 4 + y;
            xx = (b % 2) * 4 + x;
            s += int'(cur[32 + 8 * c + yy][xx]);
            s -= inter ? int'(mc[32 + 8 * c + yy][xx]) : int'(pr[c][yy][xx]);
          end
        d[b] = s;
      end
      f[0] = d[0] + d[1] + d[2] + d[3];
      f[1] = d[0] - d[1] + d[2] - d[3];
      f[2] = d[0] + d[1] - d[2] - d[3];
      f[3] = d[0] - d[1] - d[2] + d[3];
      for (int b = 0; b < 4; b++) l[b] = hq(f[b], qm, qd, inter);
      g[0] = l[0] + l[1] + l[2] + l[3];
      g[1] = l[0] - l[1] + l[2] - l[3];
      g[2] = l[0] + l[1] - l[2] - l[3];
      g[3] = l[0] - l[1] - l[2] + l[3];
      for (int b = 0; b < 4; b++) begin
        lvl_n[4 * c + b] = sat16(longint'(l[b]));
        dcc_n[4 * c + b] = sat16(((longint'(g[b]) * longint'(16 * v4(qm, 0))) <<< qd) >>> 5);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dc_level <= '{default: '0};
      dc_coef  <= '{default: '0};
    end else if (capture) begin
      dc_level <= lvl_n;
      dc_coef  <= dcc_n;
    end

endmodule
