// tb_mode_decision: the SATD cost, best-mode and MB-cost unit fed with the
// coefficient stream of a complete prediction stage (Intra_4x4 pairs,
// Intra_8x8 blocks, chroma) of random coefficients and random mode
// usability, with reconstruction-stage and inverse-transform rows mixed in
// that must be ignored. Best modes, best chroma mode, both MB costs and the
// Intra_4x4 / Intra_8x8 choice are compared with a model, for several QPs.
module tb_mode_decision;
  import intra_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic        rst_n = 0, clear = 0;
  logic [5:0]  qp = 0;
  logic        in_valid = 0, in_last = 0, in_inv = 0;
  logic [2:0]  in_idx = 0;
  job_t        in_tag = '0;
  coef_t [7:0] in_data = '0;
  logic [3:0]  best4 [16], best8 [4], best_uv;
  logic [23:0] cost_i4, cost_i8, cost_uv;
  logic        use_i8;
  int checks = 0, failures = 0;

  mode_decision dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // lambda = QP2QUANT[max(0, QP - 12)] of the reference encoder
  function automatic int lam(int q);
    int t [40] = '{1, 1, 1, 1, 2, 2, 2, 2, 3, 3, 3, 4, 4, 4, 5, 6, 6, 7, 8, 9, 10, 11, 13,
                   14, 16, 18, 20, 23, 25, 29, 32, 36, 40, 45, 51, 57, 64, 72, 81, 91};
    return t[q < 12 ? 0 : q - 12];
  endfunction

  localparam int MAXC = 24'hFFFFFF;
  int m_c4 [16], m_b4 [16], m_c8 [4], m_b8 [4], m_cuv, m_buv;
  int amp;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // send one job of `rows` rows; returns the lane-group sums (weighted)
  task automatic send(job_t t, int rows, bit inv, output int slo, output int shi);
    slo = 0; shi = 0;
    for (int r = 0; r < rows; r++) begin
      @(negedge clk);
      in_valid = 1; in_idx = 3'(r); in_last = (r == rows - 1); in_inv = inv; in_tag = t;
      for (int l = 0; l < 8; l++) begin
        int v, w;
        v = int'($urandom % (2 * amp + 1)) - amp;
        in_data[l] = coef_t'(v);
        if (v < 0) v = -v;
        w = (t.kind != JOB_I8 && r % 2 == 0 && l % 2 == 0) ? 2 : 1;
        if (t.kind == JOB_I8 || l < 4) slo += w * v; else shi += w * v;
      end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mb = 0; mb < 12; mb++) begin
      int lo, hi, d1, d2, s4, s8, tot;
      job_t t;
      qp  = 6'(mb * 5 % 52);
      amp = (mb % 3 == 0) ? 3 : (mb % 3 == 1) ? 40 : 400;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int b = 0; b < 16; b++) begin m_c4[b] = MAXC; m_b4[b] = 2; end
      for (int b = 0; b < 4; b++) begin m_c8[b] = MAXC; m_b8[b] = 2; end
      m_cuv = MAXC; m_buv = 0;
      // Intra_4x4 pairs
      for (int p = 0; p < 8; p++)
        for (int m = 0; m < 9; m++) begin
          t = '0; t.kind = JOB_I4; t.blk = 4'(p); t.mode = 4'(m);
          t.ok_lo = ($urandom % 4) != 0 || m == 2;
          t.ok_hi = ($urandom % 4) != 0 || m == 2;
          send(t, 4, 0, lo, hi);
          if (t.ok_lo && lo / 2 < m_c4[2 * p])     begin m_c4[2 * p] = lo / 2;     m_b4[2 * p] = m; end
          if (t.ok_hi && hi / 2 < m_c4[2 * p + 1]) begin m_c4[2 * p + 1] = hi / 2; m_b4[2 * p + 1] = m; end
          if ($urandom % 8 == 0) begin
            // a reconstruction-stage job and an inverse job: ignored
            t.recon = 1; send(t, 4, 1, d1, d2);
            t.recon = 0; send(t, 4, 1, d1, d2);
          end
        end
      // Intra_8x8
      for (int b = 0; b < 4; b++)
        for (int m = 0; m < 9; m++) begin
          t = '0; t.kind = JOB_I8; t.blk = 4'(b); t.mode = 4'(m);
          t.ok_lo = ($urandom % 4) != 0 || m == 2;
          t.ok_hi = 1;
          send(t, 8, 0, lo, hi);
          if (t.ok_lo && lo / 2 < m_c8[b]) begin m_c8[b] = lo / 2; m_b8[b] = m; end
        end
      // chroma: four jobs per mode
      for (int m = 0; m < 3; m++) begin
        bit ok;
        ok = ($urandom % 3) != 0 || m == 0;
        tot = 0;
        for (int j = 0; j < 4; j++) begin
          t = '0; t.kind = JOB_UV; t.blk = 4'(j); t.mode = 4'(m); t.ok_lo = ok; t.ok_hi = ok;
          send(t, 4, 0, lo, hi);
          tot += lo / 2 + hi / 2;
        end
        if (ok && tot < m_cuv) begin m_cuv = tot; m_buv = m; end
      end
      @(negedge clk);
      s4 = 64 * lam(qp); s8 = 16 * lam(qp);
      for (int b = 0; b < 16; b++) s4 += m_c4[b];
      for (int b = 0; b < 4; b++) s8 += m_c8[b];
      if (s4 > MAXC) s4 = MAXC;
      if (s8 > MAXC) s8 = MAXC;
      for (int b = 0; b < 16; b++) chk(int'(best4[b]) == m_b4[b], $sformatf("best4[%0d] mb %0d", b, mb));
      for (int b = 0; b < 4; b++)  chk(int'(best8[b]) == m_b8[b], $sformatf("best8[%0d] mb %0d", b, mb));
      chk(int'(best_uv) == m_buv, "best_uv");
      chk(int'(cost_uv) == m_cuv, "cost_uv");
      chk(int'(cost_i4) == s4, $sformatf("cost_i4 %0d/%0d", cost_i4, s4));
      chk(int'(cost_i8) == s8, $sformatf("cost_i8 %0d/%0d", cost_i8, s8));
      chk(use_i8 == (s8 < s4), "use_i8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
