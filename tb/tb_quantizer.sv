// tb_quantizer: random coefficient rows at every QP, both block sizes,
// intra and inter rounding and luma / chroma lanes, compared with the
// quantisation formula evaluated here from the standard's multiplier
// tables.
module tb_quantizer;
  import intra_pkg::*;

  logic        blk8, inter;
  logic [2:0]  k;
  logic [5:0]  qp;
  logic [7:0]  chroma;
  coef_t [7:0] coef, level;
  int checks = 0, failures = 0;

  quantizer dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int MF4 [6][3] = '{'{13107,5243,8066},'{11916,4660,7490},'{10082,4194,6554},
                     '{9362,3647,5825},'{8192,3355,5243},'{7282,2893,4559}};
  int MF8 [6][6] = '{'{13107,11428,20972,12222,16777,15481},'{11916,10826,19174,11058,14980,14290},
                     '{10082,8943,15978,9675,12710,11985},'{9362,8228,14913,8931,11984,11259},
                     '{8192,7346,13159,7740,10486,9777},'{7282,6428,11570,6830,9118,8640}};
  int QPC [52];

  function automatic int mf(bit b8, int q, int i, int j);
    if (!b8) begin
      if (i % 2 == 0 && j % 2 == 0) return MF4[q % 6][0];
      if (i % 2 == 1 && j % 2 == 1) return MF4[q % 6][1];
      return MF4[q % 6][2];
    end
    if (i % 4 == 0 && j % 4 == 0) return MF8[q % 6][0];
    if (i % 2 == 1 && j % 2 == 1) return MF8[q % 6][1];
    if (i % 4 == 2 && j % 4 == 2) return MF8[q % 6][2];
    if ((i % 4 == 0 && j % 2 == 1) || (i % 2 == 1 && j % 4 == 0)) return MF8[q % 6][3];
    if ((i % 4 == 0 && j % 4 == 2) || (i % 4 == 2 && j % 4 == 0)) return MF8[q % 6][4];
    return MF8[q % 6][5];
  endfunction

  initial begin
    int tab [22] = '{29,30,31,32,32,33,34,34,35,35,36,36,37,37,37,38,38,38,39,39,39,39};
    for (int q = 0; q < 52; q++) QPC[q] = (q < 30) ? q : tab[q - 30];
    for (int it = 0; it < 4000; it++) begin
      blk8 = $urandom % 2; inter = $urandom % 2; k = 3'($urandom % (blk8 ? 8 : 4));
      qp = 6'($urandom % 52); chroma = 8'($urandom);
      for (int l = 0; l < 8; l++) coef[l] = coef_t'(int'($urandom % 32001) - 16000);
      if (it % 10 == 0) coef[0] = 0;
      #1;
      for (int l = 0; l < 8; l++) begin
        int q, qb, a, e;
        longint f;
        q  = chroma[l] ? QPC[qp] : int'(qp);
        qb = (blk8 ? 16 : 15) + q / 6;
        f  = inter ? (longint'(1) << qb) / 6 : (longint'(1) << qb) / 3;
        a  = (coef[l] < 0) ? -int'(coef[l]) : int'(coef[l]);
        e  = int'((longint'(a) * mf(blk8, q, int'(k), blk8 ? l : l % 4) + f) >> qb);
        if (coef[l] < 0) e = -e;
        checks++;
        if (int'(level[l]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL qp=%0d b8=%0d lane %0d: %0d expected %0d", qp, blk8, l, level[l], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
