// tb_inv_quantizer: random levels at every QP, both block sizes and luma /
// chroma lanes, compared with the standard's dequantisation written out in
// its two cases (left shift for large QP, rounded right shift for small QP),
// including saturation to 16 bits.
module tb_inv_quantizer;
  import intra_pkg::*;

  logic        blk8;
  logic [2:0]  k;
  logic [5:0]  qp;
  logic [7:0]  chroma;
  coef_t [7:0] level, coef;
  int checks = 0, failures = 0;

  inv_quantizer dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int V4 [6][3] = '{'{10,16,13},'{11,18,14},'{13,20,16},'{14,23,18},'{16,25,20},'{18,29,23}};
  int V8 [6][6] = '{'{20,18,32,19,25,24},'{22,19,35,21,28,26},'{26,23,42,24,33,31},
                    '{28,25,45,26,35,33},'{32,28,51,30,40,38},'{36,32,58,34,46,43}};
  int QPC [52];

  function automatic int ls(bit b8, int q, int i, int j);
    if (!b8) begin
      if (i % 2 == 0 && j % 2 == 0) return 16 * V4[q % 6][0];
      if (i % 2 == 1 && j % 2 == 1) return 16 * V4[q % 6][1];
      return 16 * V4[q % 6][2];
    end
    if (i % 4 == 0 && j % 4 == 0) return 16 * V8[q % 6][0];
    if (i % 2 == 1 && j % 2 == 1) return 16 * V8[q % 6][1];
    if (i % 4 == 2 && j % 4 == 2) return 16 * V8[q % 6][2];
    if ((i % 4 == 0 && j % 2 == 1) || (i % 2 == 1 && j % 4 == 0)) return 16 * V8[q % 6][3];
    if ((i % 4 == 0 && j % 4 == 2) || (i % 4 == 2 && j % 4 == 0)) return 16 * V8[q % 6][4];
    return 16 * V8[q % 6][5];
  endfunction

  initial begin
    int tab [22] = '{29,30,31,32,32,33,34,34,35,35,36,36,37,37,37,38,38,38,39,39,39,39};
    for (int q = 0; q < 52; q++) QPC[q] = (q < 30) ? q : tab[q - 30];
    for (int it = 0; it < 4000; it++) begin
      blk8 = $urandom % 2; k = 3'($urandom % (blk8 ? 8 : 4));
      qp = 6'($urandom % 52); chroma = 8'($urandom);
      for (int l = 0; l < 8; l++)
        level[l] = coef_t'((it % 3 == 0) ? int'($urandom % 4001) - 2000 : int'($urandom % 41) - 20);
      #1;
      for (int l = 0; l < 8; l++) begin
        int q, s;
        longint e;
        q = chroma[l] ? QPC[qp] : int'(qp);
        s = ls(blk8, q, int'(k), blk8 ? l : l % 4);
        if (!blk8) begin
          if (q >= 24) e = (longint'(level[l]) * s) <<< (q / 6 - 4);
          else e = (longint'(level[l]) * s + (longint'(1) <<< (3 - q / 6))) >>> (4 - q / 6);
        end else begin
          if (q >= 36) e = (longint'(level[l]) * s) <<< (q / 6 - 6);
          else e = (longint'(level[l]) * s + (longint'(1) <<< (5 - q / 6))) >>> (6 - q / 6);
        end
        if (e > 32767) e = 32767;
        if (e < -32768) e = -32768;
        checks++;
        if (longint'(coef[l]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL qp=%0d b8=%0d lane %0d: %0d expected %0d", qp, blk8, l, coef[l], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
