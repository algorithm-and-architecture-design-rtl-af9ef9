// chroma_predictor: predicted pixels for the 8x8 chroma blocks, one row of
// eight per clock.
//
// The chroma prediction of H.264 uses only the reconstructed pixels above and
// to the left of the macroblock, so it needs no pixels from inside the MB and
// has no dependency between blocks. Given the component's neighbours it gives
// row `row` (0..7) for mode DC (0), horizontal (1) or vertical (2). DC is
// formed per 4x4 quarter with the standard's rules: the top-left and
// bottom-right quarters average top and left neighbours, the top-right
// quarter prefers the top row, the bottom-left one the left column. Plane
// mode is not built: the schedule of the document gives the chroma
// prediction 48 cycles, which is three modes for two 8x8 components at eight
// pixels per clock. Purely combinational.
module chroma_predictor
  import intra_pkg::*;
(
  input  logic [3:0]  mode,
  input  logic [2:0]  row,
  input  pix_t [7:0]  top,        // p[x,-1], x = 0..7
  input  pix_t [7:0]  left,       // p[-1,y], y = 0..7
  input  logic        a_top,
  input  logic        a_left,
  output pix_t [7:0]  pred,
  output logic        ok
);

  function automatic pix_t dc4(int xo, int yo);
    int st, sl;
    logic use_t, use_l;
    st = 0;
    sl = 0;
    for (int i = 0; i < 4; i++) begin
      st += int'(top[xo + i]);
      sl += int'(left[yo + i]);
    end
    if (xo == yo) begin
      use_t = a_top;
      use_l = a_left;
    end else if (yo == 0) begin
      use_t = a_top;
      use_l = !a_top && a_left;
    end else begin
      use_l = a_left;
      use_t = !a_left && a_top;
    end
    if (use_t && use_l) return pix_t'((st + sl + 4) >> 3);
    if (use_t)          return pix_t'((st + 2) >> 2);
    if (use_l)          return pix_t'((sl + 2) >> 2);
    return 8'd128;
  endfunction

  always_comb begin
    for (int x = 0; x < 8; x++) begin
      case (mode)
        CM_HOR:  pred[x] = left[row];
        CM_VERT: pred[x] = top[x];
        default: pred[x] = dc4((x / 4) * 4, (int'(row) / 4) * 4);
      endcase
    end
    case (mode)
      CM_HOR:  ok = a_left;
      CM_VERT: ok = a_top;
      CM_DC:   ok = 1'b1;
      default: ok = 1'b0;
    endcase
  end

endmodule
