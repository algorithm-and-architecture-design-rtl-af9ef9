// tb_chroma_predictor: DC, horizontal and vertical chroma prediction for
// every row and every combination of top / left availability, compared with
// the standard's per-quarter DC rules written out here, plus the usability
// flag of each mode.
module tb_chroma_predictor;
  import intra_pkg::*;

  logic [3:0]  mode;
  logic [2:0]  row;
  pix_t [7:0]  top, left, pred;
  logic        a_top, a_left, ok;
  int checks = 0, failures = 0;

  chroma_predictor dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int i = 0; i < 8; i++) begin
        top[i] = pix_t'($urandom);
        left[i] = pix_t'($urandom);
      end
      a_top = it[0]; a_left = it[1];
      for (int m = 0; m < 3; m++)
        for (int r = 0; r < 8; r++) begin
          mode = 4'(m); row = 3'(r);
          #1;
          for (int x = 0; x < 8; x++) begin
            int e, st, sl;
            // quarter: 0 top-left, 1 top-right, 2 bottom-left, 3 bottom-right
            int qd;
            qd = (x / 4) + 2 * (r / 4);
            st = 0; sl = 0;
            for (int i = 0; i < 4; i++) begin
              st += top[(x / 4) * 4 + i];
              sl += left[(r / 4) * 4 + i];
            end
            if (m == 1) e = left[r];
            else if (m == 2) e = top[x];
            else begin
              case (qd)
                1: e = a_top ? (st + 2) >> 2 : a_left ? (sl + 2) >> 2 : 128;
                2: e = a_left ? (sl + 2) >> 2 : a_top ? (st + 2) >> 2 : 128;
                default: e = (a_top && a_left) ? (st + sl + 4) >> 3 : a_top ? (st + 2) >> 2
                             : a_left ? (sl + 2) >> 2 : 128;
              endcase
            end
            checks++;
            if (int'(pred[x]) != e) begin
              failures++;
              if (failures < 10) $display("FAIL m=%0d r=%0d x=%0d: %0d expected %0d", m, r, x, pred[x], e);
            end
          end
          checks++;
          if (ok != ((m == 0) || (m == 1 && a_left) || (m == 2 && a_top))) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
