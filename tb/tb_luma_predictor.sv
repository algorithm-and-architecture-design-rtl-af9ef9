// tb_luma_predictor: checks every mode, both block sizes and every row of
// the reconfigurable luma predictor against the reference equations, with
// random neighbour pixels and random availability, including the usability
// flags of each mode.
module tb_luma_predictor;
  import intra_pkg::*;
  import tb_ref_pkg::*;

  logic        blk8;
  logic [3:0]  mode;
  logic [2:0]  row;
  nbr_t        nb_lo, nb_hi;
  pix_t [7:0]  pred;
  logic        ok_lo, ok_hi;
  int checks = 0, failures = 0;

  luma_predictor dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic to_arrays(nbr_t nb, output int P [17], output int L [8]);
    for (int i = 0; i < 17; i++) P[i] = int'(nb.top[i]);
    for (int j = 0; j < 8; j++)  L[j] = int'(nb.left[j]);
  endtask

  function automatic bit ref_ok(nbr_t nb, int m);
    case (m)
      0, 3, 7: return nb.a_top;
      1, 8:    return nb.a_left;
      2:       return 1;
      default: return nb.a_top && nb.a_left && nb.a_corner;
    endcase
  endfunction

  initial begin
    int P0 [17], L0 [8], P1 [17], L1 [8];
    for (int it = 0; it < 60; it++) begin
      nb_lo = nbr_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      nb_hi = nbr_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      if (it < 4) begin
        // extreme values
        nb_lo.top = '1; nb_lo.left = '1; nb_hi.top = '0; nb_hi.left = '1;
      end
      to_arrays(nb_lo, P0, L0);
      to_arrays(nb_hi, P1, L1);
      for (int b8 = 0; b8 < 2; b8++)
        for (int m = 0; m < 9; m++)
          for (int r = 0; r < (b8 ? 8 : 4); r++) begin
            blk8 = b8[0]; mode = 4'(m); row = 3'(r);
            #1;
            for (int l = 0; l < 8; l++) begin
              int e;
              if (b8) e = ref_luma(P0, L0, nb_lo.a_top, nb_lo.a_left, 8, m, l, r);
              else if (l < 4) e = ref_luma(P0, L0, nb_lo.a_top, nb_lo.a_left, 4, m, l, r);
              else e = ref_luma(P1, L1, nb_hi.a_top, nb_hi.a_left, 4, m, l - 4, r);
              checks++;
              if (int'(pred[l]) != e) begin
                failures++;
                if (failures < 10)
                  $display("FAIL b8=%0d mode=%0d row=%0d lane=%0d: %0d expected %0d", b8, m, r, l, pred[l], e);
              end
            end
            checks++;
            if (ok_lo != ref_ok(nb_lo, m) || (!b8 && ok_hi != ref_ok(nb_hi, m))) failures++;
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
