// luma_predictor: reconfigurable luma predictor generator, eight predicted
// pixels per clock.
//
// With blk8 = 1 it gives row `row` (0..7) of the Intra_8x8 prediction of one
// 8x8 block from the (already filtered) neighbours nb_lo. With blk8 = 0 it
// gives row `row` (0..3) of two 4x4 blocks at once: lanes 0..3 predict the
// left block from nb_lo and lanes 4..7 the right block from nb_hi (Fig. 7).
// One set of per-lane equations serves both sizes because the nine H.264
// directional modes of Fig. 1 (vertical, horizontal, DC, diagonal down-left,
// diagonal down-right, vertical-right, horizontal-down, vertical-left,
// horizontal-up) use the same formulas for 4x4 and 8x8 with the block size n
// as a parameter. ok_lo / ok_hi tell whether the mode may be used with the
// neighbours that are available. Purely combinational; the document gives
// the eight-wide reconfigurable organisation, the formulas are the
// standard's.
module luma_predictor
  import intra_pkg::*;
(
  input  logic        blk8,
  input  logic [3:0]  mode,
  input  logic [2:0]  row,
  input  nbr_t        nb_lo,
  input  nbr_t        nb_hi,
  output pix_t [7:0]  pred,
  output logic        ok_lo,
  output logic        ok_hi
);

  // p[x,-1] for x = -1 .. 2n-1 and p[-1,y] for y = -1 .. n-1
  function automatic int pt(nbr_t nb, int x);
    return int'(nb.top[x + 1]);
  endfunction
  function automatic int pl(nbr_t nb, int y);
    if (y < 0) return int'(nb.top[0]);
    return int'(nb.left[y]);
  endfunction

  function automatic logic mode_ok(nbr_t nb, logic [3:0] m);
    case (m)
      4'd0, 4'd3, 4'd7: return nb.a_top;
      4'd1, 4'd8:       return nb.a_left;
      4'd2:             return 1'b1;
      4'd4, 4'd5, 4'd6: return nb.a_top && nb.a_left && nb.a_corner;
      default:          return 1'b0;
    endcase
  endfunction

  function automatic pix_t predict(nbr_t nb, int n, logic [3:0] m, int x, int y);
    int v, z, s;
    v = 128;
    case (m)
      4'd0: v = pt(nb, x);
      4'd1: v = pl(nb, y);
      4'd2: begin
        s = 0;
        if (nb.a_top && nb.a_left) begin
          for (int i = 0; i < 8; i++) if (i < n) s += pt(nb, i) + pl(nb, i);
          v = (n == 8) ? (s + 8) >> 4 : (s + 4) >> 3;
        end else if (nb.a_top) begin
          for (int i = 0; i < 8; i++) if (i < n) s += pt(nb, i);
          v = (n == 8) ? (s + 4) >> 3 : (s + 2) >> 2;
        end else if (nb.a_left) begin
          for (int i = 0; i < 8; i++) if (i < n) s += pl(nb, i);
          v = (n == 8) ? (s + 4) >> 3 : (s + 2) >> 2;
        end
      end
      4'd3: begin
        if (x == n - 1 && y == n - 1)
          v = (pt(nb, 2 * n - 2) + 3 * pt(nb, 2 * n - 1) + 2) >> 2;
        else
          v = (pt(nb, x + y) + 2 * pt(nb, x + y + 1) + pt(nb, x + y + 2) + 2) >> 2;
      end
      4'd4: begin
        if (x > y)
          v = (pt(nb, x - y - 2) + 2 * pt(nb, x - y - 1) + pt(nb, x - y) + 2) >> 2;
        else if (x < y)
          v = (pl(nb, y - x - 2) + 2 * pl(nb, y - x - 1) + pl(nb, y - x) + 2) >> 2;
        else
          v = (pt(nb, 0) + 2 * pl(nb, -1) + pl(nb, 0) + 2) >> 2;
      end
      4'd5: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0)
          v = (pt(nb, x - (y >> 1) - 1) + pt(nb, x - (y >> 1)) + 1) >> 1;
        else if (z >= 0)
          v = (pt(nb, x - (y >> 1) - 2) + 2 * pt(nb, x - (y >> 1) - 1)
               + pt(nb, x - (y >> 1)) + 2) >> 2;
        else if (z == -1)
          v = (pl(nb, 0) + 2 * pl(nb, -1) + pt(nb, 0) + 2) >> 2;
        else
          v = (pl(nb, y - 2 * x - 1) + 2 * pl(nb, y - 2 * x - 2)
               + pl(nb, y - 2 * x - 3) + 2) >> 2;
      end
      4'd6: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0)
          v = (pl(nb, y - (x >> 1) - 1) + pl(nb, y - (x >> 1)) + 1) >> 1;
        else if (z >= 0)
          v = (pl(nb, y - (x >> 1) - 2) + 2 * pl(nb, y - (x >> 1) - 1)
               + pl(nb, y - (x >> 1)) + 2) >> 2;
        else if (z == -1)
          v = (pl(nb, 0) + 2 * pl(nb, -1) + pt(nb, 0) + 2) >> 2;
        else
          v = (pt(nb, x - 2 * y - 1) + 2 * pt(nb, x - 2 * y - 2)
               + pt(nb, x - 2 * y - 3) + 2) >> 2;
      end
      4'd7: begin
        if (y % 2 == 0)
          v = (pt(nb, x + (y >> 1)) + pt(nb, x + (y >> 1) + 1) + 1) >> 1;
        else
          v = (pt(nb, x + (y >> 1)) + 2 * pt(nb, x + (y >> 1) + 1)
               + pt(nb, x + (y >> 1) + 2) + 2) >> 2;
      end
      4'd8: begin
        z = x + 2 * y;
        if (z < 2 * n - 3 && z % 2 == 0)
          v = (pl(nb, y + (x >> 1)) + pl(nb, y + (x >> 1) + 1) + 1) >> 1;
        else if (z < 2 * n - 3)
          v = (pl(nb, y + (x >> 1)) + 2 * pl(nb, y + (x >> 1) + 1)
               + pl(nb, y + (x >> 1) + 2) + 2) >> 2;
        else if (z == 2 * n - 3)
          v = (pl(nb, n - 2) + 3 * pl(nb, n - 1) + 2) >> 2;
        else
          v = pl(nb, n - 1);
      end
      default: v = 128;
    endcase
    return pix_t'(v);
  endfunction

  always_comb begin
    for (int l = 0; l < 8; l++) begin
      if (blk8)
        pred[l] = predict(nb_lo, 8, mode, l, int'(row));
      else if (l < 4)
        pred[l] = predict(nb_lo, 4, mode, l, int'(row[1:0]));
      else
        pred[l] = predict(nb_hi, 4, mode, l - 4, int'(row[1:0]));
    end
    ok_lo = mode_ok(nb_lo, mode);
    ok_hi = blk8 ? 1'b1 : mode_ok(nb_hi, mode);
  end

endmodule
