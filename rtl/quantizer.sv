// quantizer: forward quantisation of one row of transform coefficients,
// eight lanes per clock.
//
// Input is coefficient row k of the multi-transform's forward output: with
// blk8 = 1 lane l holds coefficient (k, l) of an 8x8 block, with blk8 = 0
// lanes 0..3 and 4..7 hold row k of two 4x4 blocks. Each lane computes
//   level = sign(W) * ((|W| * MF(QP % 6, position) + f) >> qbits)
// with qbits = 15 + QP/6 (4x4) or 16 + QP/6 (8x8), f = 2^qbits/3 for intra
// and 2^qbits/6 for inter blocks, and the standard's multiplier tables for a
// flat scaling list. Lanes flagged in `chroma` use the chroma QP derived from
// `qp`. Purely combinational. The document names this block only; the
// arithmetic is the usual H.264 encoder quantiser.
module quantizer
  import intra_pkg::*;
(
  input  logic        blk8,
  input  logic [2:0]  k,
  input  logic [5:0]  qp,
  input  logic [7:0]  chroma,
  input  logic        inter,
  input  coef_t [7:0] coef,
  output coef_t [7:0] level
);

  always_comb begin
    for (int l = 0; l < 8; l++) begin
      int unsigned q, qm, qd, cls, mf, qbits;
      longint unsigned mag, f, res;
      q   = chroma[l] ? int'(chroma_qp(qp)) : int'(qp);
      qm  = q % 6;
      qd  = q / 6;
      if (blk8) begin
        cls   = cls8(int'(k), l);
        mf    = mf8(qm, cls);
        qbits = 16 + qd;
      end else begin
        cls   = cls4(int'(k), l % 4);
        mf    = mf4(qm, cls);
        qbits = 15 + qd;
      end
      f   = inter ? (64'd1 << qbits) / 6 : (64'd1 << qbits) / 3;
      mag = (coef[l] < 0) ? -longint'(coef[l]) : longint'(coef[l]);
      res = (mag * longint'(mf) + f) >> qbits;
      level[l] = (coef[l] < 0) ? -coef_t'(res) : coef_t'(res);
    end
  end

endmodule
