// intra_pkg: types, constants and table functions shared by the H.264 high
// profile intra prediction / reconstruction engine.
//
// The engine moves data eight pixels (one 64-bit word) per clock. A macroblock
// (MB) is held as 48 such words: words 0..31 are the 16x16 luma block, two
// words per row (word = 2*y + x/8), words 32..39 the 8x8 Cb (U) block and
// words 40..47 the 8x8 Cr (V) block, one word per row.
//
// Work is issued as "jobs": one 8x8 luma block, or two 4x4 blocks side by side
// (lanes 0..3 and 4..7), for one prediction mode. The job descriptor travels
// with the data through the transform so that the cost, quantiser and
// write-back logic downstream know what they are looking at.
//
// The quantisation tables (MF, V) and the chroma QP mapping are the ones of
// the H.264 standard with flat scaling lists; the document names the
// quantiser blocks but does not give their contents.
package intra_pkg;

  localparam int unsigned MB_WORDS = 48;   // "48x64" buffers of Fig. 8
  localparam int unsigned LANES    = 8;    // 8-pixel parallelism

  typedef logic [7:0]         pix_t;
  typedef logic signed [15:0] coef_t;      // transform coefficient / level
  typedef logic [LANES-1:0][7:0] word_t;     // 8 pixels, lane i in bits 8i+7:8i

  // Job kinds
  typedef enum logic [1:0] {
    JOB_I4 = 2'd0,   // two 4x4 luma blocks (prediction) or one 4x4 luma +
                     // one 4x4 chroma block (Intra_4x4 reconstruction)
    JOB_I8 = 2'd1,   // one 8x8 luma block (Intra_8x8 or inter)
    JOB_UV = 2'd2    // two horizontally adjacent 4x4 chroma blocks
  } job_kind_e;

  // Luma prediction modes (Fig. 1 numbering)
  typedef enum logic [3:0] {
    M_VERT = 4'd0, M_HOR = 4'd1, M_DC = 4'd2, M_DDL = 4'd3, M_DDR = 4'd4,
    M_VR   = 4'd5, M_HD  = 4'd6, M_VL = 4'd7, M_HU  = 4'd8
  } luma_mode_e;

  // Chroma prediction modes (H.264 numbering; plane mode is not built)
  localparam logic [3:0] CM_DC = 4'd0, CM_HOR = 4'd1, CM_VERT = 4'd2;
  localparam int unsigned N_CHROMA_MODES = 3;

  typedef struct packed {
    logic       recon;    // 0: open-loop prediction stage, 1: reconstruction
    logic       inter;    // reconstruction of an inter MB (MC predictor)
    job_kind_e  kind;
    logic [3:0] blk;      // I4 pred: pair 0..7; I4 rec: luma 4x4 0..15;
                          // I8: 8x8 block 0..3; UV: comp*2 + row half
    logic [3:0] mode;     // prediction mode
    logic       hi_uv;    // I4 rec: lanes 4..7 carry chroma block uv_blk
    logic [2:0] uv_blk;   // chroma 4x4 block, 0..3 U, 4..7 V
    logic       hi_off;   // I4 rec: lanes 4..7 carry nothing
    logic       ok_lo;    // prediction: mode usable for the (left) block
    logic       ok_hi;    // prediction: mode usable for the right block
  } job_t;

  // Neighbours of one block: top[0] is the corner p[-1,-1], top[1+i] is
  // p[i,-1] (i = 0..15, of which a 4x4 block uses 0..7), left[j] is p[-1,j].
  typedef struct packed {
    pix_t [16:0] top;
    pix_t [7:0]  left;
    logic        a_top;
    logic        a_left;
    logic        a_corner;
  } nbr_t;

  // Block size of a job in rows (4 or 8)
  function automatic int unsigned job_rows(job_t j);
    return (j.kind == JOB_I8) ? 8 : 4;
  endfunction

  // Position of 4x4 luma block n (zig-zag order of Fig. 2(a)) in pixels
  function automatic logic [3:0] blk4_x(logic [3:0] n);
    return {n[2], n[0], 2'b00};
  endfunction
  function automatic logic [3:0] blk4_y(logic [3:0] n);
    return {n[3], n[1], 2'b00};
  endfunction

  // Where lane jl of row r of a job lives in the 48-word MB layout:
  // returns {word, lane}. For a 4x4-pair job, lanes 0..3 are the left block
  // and lanes 4..7 the right one (or the chroma block in Intra_4x4
  // reconstruction).
  function automatic logic [8:0] job_pos(job_t j, int unsigned r, int unsigned jl);
    int unsigned w, ln, x0, y0, cmp;
    case (j.kind)
      JOB_I8: begin
        w  = (8 * int'(j.blk[1]) + r) * 2 + int'(j.blk[0]);
        ln = jl;
      end
      JOB_UV: begin
        w  = 32 + 8 * int'(j.blk[1]) + 4 * int'(j.blk[0]) + r;
        ln = jl;
      end
      default: begin
        if (!j.recon) begin
          x0 = int'(blk4_x({j.blk[2:0], 1'b0}));
          y0 = int'(blk4_y({j.blk[2:0], 1'b0}));
          w  = (y0 + r) * 2 + x0 / 8;
          ln = jl;
        end else if (jl < 4) begin
          x0 = int'(blk4_x(j.blk));
          y0 = int'(blk4_y(j.blk));
          w  = (y0 + r) * 2 + x0 / 8;
          ln = (x0 % 8) + jl;
        end else begin
          cmp = int'(j.uv_blk[2]);
          w   = 32 + 8 * cmp + 4 * int'(j.uv_blk[1]) + r;
          ln  = 4 * int'(j.uv_blk[0]) + jl - 4;
        end
      end
    endcase
    return {6'(w), 3'(ln)};
  endfunction

  // Chroma QP from luma QP (chroma_qp_index_offset = 0)
  function automatic logic [5:0] chroma_qp(logic [5:0] qp);
    logic [5:0] t [22];
    t = '{6'd29, 6'd30, 6'd31, 6'd32, 6'd32, 6'd33, 6'd34, 6'd34, 6'd35,
          6'd35, 6'd36, 6'd36, 6'd37, 6'd37, 6'd37, 6'd38, 6'd38, 6'd38,
          6'd39, 6'd39, 6'd39, 6'd39};
    if (qp < 6'd30) return qp;
    return t[5'(qp - 6'd30)];
  endfunction

  // Position class of coefficient (i,j) of a 4x4 block: 0, 1 or 2
  function automatic int unsigned cls4(int unsigned i, int unsigned j);
    if ((i % 2 == 0) && (j % 2 == 0)) return 0;
    if ((i % 2 == 1) && (j % 2 == 1)) return 1;
    return 2;
  endfunction

  // Position class of coefficient (i,j) of an 8x8 block: 0..5
  function automatic int unsigned cls8(int unsigned i, int unsigned j);
    if ((i % 4 == 0) && (j % 4 == 0)) return 0;
    if ((i % 2 == 1) && (j % 2 == 1)) return 1;
    if ((i % 4 == 2) && (j % 4 == 2)) return 2;
    if (((i % 4 == 0) && (j % 2 == 1)) || ((i % 2 == 1) && (j % 4 == 0))) return 3;
    if (((i % 4 == 0) && (j % 4 == 2)) || ((i % 4 == 2) && (j % 4 == 0))) return 4;
    return 5;
  endfunction

  // Forward quantisation multiplier, 4x4
  function automatic int unsigned mf4(int unsigned r, int unsigned c);
    int unsigned t [6][3];
    t = '{'{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
          '{ 9362, 3647, 5825}, '{ 8192, 3355, 5243}, '{ 7282, 2893, 4559}};
    return t[r][c];
  endfunction

  // Forward quantisation multiplier, 8x8
  function automatic int unsigned mf8(int unsigned r, int unsigned c);
    int unsigned t [6][6];
    t = '{'{13107, 11428, 20972, 12222, 16777, 15481},
          '{11916, 10826, 19174, 11058, 14980, 14290},
          '{10082,  8943, 15978,  9675, 12710, 11985},
          '{ 9362,  8228, 14913,  8931, 11984, 11259},
          '{ 8192,  7346, 13159,  7740, 10486,  9777},
          '{ 7282,  6428, 11570,  6830,  9118,  8640}};
    return t[r][c];
  endfunction

  // Dequantisation scale, 4x4
  function automatic int unsigned v4(int unsigned r, int unsigned c);
    int unsigned t [6][3];
    t = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
          '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
    return t[r][c];
  endfunction

  // Dequantisation scale, 8x8
  function automatic int unsigned v8(int unsigned r, int unsigned c);
    int unsigned t [6][6];
    t = '{'{20, 18, 32, 19, 25, 24}, '{22, 19, 35, 21, 28, 26},
          '{26, 23, 42, 24, 33, 31}, '{28, 25, 45, 26, 35, 33},
          '{32, 28, 51, 30, 40, 38}, '{36, 32, 58, 34, 46, 43}};
    return t[r][c];
  endfunction

  // Integer DCT matrices (forward 4x4, and the 8x8 kernel whose rows the
  // 8x8 butterflies approximate with an overall factor of 1/8)
  function automatic int dct4_k(int unsigned k, int unsigned n);
    int t [4][4];
    t = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    return t[k][n];
  endfunction

  function automatic int dct8_k(int unsigned k, int unsigned n);
    int t [8][8];
    t = '{'{ 8,   8,   8,   8,   8,   8,   8,   8},
          '{12,  10,   6,   3,  -3,  -6, -10, -12},
          '{ 8,   4,  -4,  -8,  -8,  -4,   4,   8},
          '{10,  -3, -12,  -6,   6,  12,   3, -10},
          '{ 8,  -8,  -8,   8,   8,  -8,  -8,   8},
          '{ 6, -12,   3,  10, -10,  -3,  12,  -6},
          '{ 4,  -8,   8,  -4,  -4,   8,  -8,   4},
          '{ 3,  -6,  10, -12,  12, -10,   6,  -3}};
    return t[k][n];
  endfunction

  function automatic pix_t clip8(int v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return pix_t'(v);
  endfunction

endpackage
