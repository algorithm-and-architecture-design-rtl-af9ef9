// inv_quantizer: dequantisation (scaling) of one row of levels, eight lanes
// per clock, ahead of the inverse transform.
//
// Lane layout as in the quantiser (row k of one 8x8 block, or row k of two
// 4x4 blocks). With the flat scaling list of H.264 the scale is
// LevelScale = 16 * V(QP % 6, position), and
//   4x4: d = (c * LevelScale << QP/6 + 8) >> 4
//   8x8: d = (c * LevelScale << QP/6 + 32) >> 6
// which equals the standard's two cases (shift left for large QP, rounded
// shift right for small QP). Results are saturated to 16 bits. Lanes
// flagged in `chroma` use the chroma QP. Purely combinational; the document
// names the block only.
module inv_quantizer
  import intra_pkg::*;
(
  input  logic        blk8,
  input  logic [2:0]  k,
  input  logic [5:0]  qp,
  input  logic [7:0]  chroma,
  input  coef_t [7:0] level,
  output coef_t [7:0] coef
);

  always_comb begin
    for (int l = 0; l < 8; l++) begin
      int unsigned q, qm, qd;
      longint t;
      q  = chroma[l] ? int'(chroma_qp(qp)) : int'(qp);
      qm = q % 6;
      qd = q / 6;
      if (blk8) begin
        t = (longint'(level[l]) * longint'(16 * v8(qm, cls8(int'(k), l)))) <<< qd;
        t = (t + 32) >>> 6;
      end else begin
        t = (longint'(level[l]) * longint'(16 * v4(qm, cls4(int'(k), l % 4)))) <<< qd;
        t = (t + 8) >>> 4;
      end
      if (t > 32767)       coef[l] = 16'sd32767;
      else if (t < -32768) coef[l] = -16'sd32768;
      else                 coef[l] = coef_t'(t);
    end
  end

endmodule
