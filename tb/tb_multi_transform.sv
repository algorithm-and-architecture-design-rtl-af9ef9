// tb_multi_transform: random blocks in all four configurations (two 4x4 or
// one 8x8, forward or inverse), issued back to back, compared with the
// matrix form of the forward transforms and the standard's row-then-column
// inverse. Also checks that output word i of a block leaves N + 1 cycles
// after input row i (full throughput of one row per clock), except right
// after a change from 8x8 to 4x4 blocks, where a word waits for the previous
// block's last word.
module tb_multi_transform;
  import intra_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_ready, in_inv = 0, in_blk8 = 0;
  job_t        in_tag = '0;
  coef_t [7:0] in_data = '0;
  logic        out_valid, out_last, out_inv, out_blk8, busy;
  logic [2:0]  out_idx;
  job_t        out_tag;
  coef_t [7:0] out_data;

  multi_transform dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int A4 [4][4] = '{'{1,1,1,1}, '{2,1,-1,-2}, '{1,-1,-1,1}, '{1,-2,2,-1}};
  int A8 [8][8] = '{'{8,8,8,8,8,8,8,8}, '{12,10,6,3,-3,-6,-10,-12}, '{8,4,-4,-8,-8,-4,4,8},
                    '{10,-3,-12,-6,6,12,3,-10}, '{8,-8,-8,8,8,-8,-8,8},
                    '{6,-12,3,10,-10,-3,12,-6}, '{4,-8,8,-4,-4,8,-8,4},
                    '{3,-6,10,-12,12,-10,6,-3}};

  // expected output words, in order, and the cycle each should appear
  int exp_q [$];   // eight lanes per word, flattened
  int exp_t [$];
  int last_t = 0;

  task automatic send_block(bit inv, bit b8);
    int X [8][8];
    int n;
    int E [8][8];
    n = b8 ? 8 : 4;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < 8; c++)
        X[r][c] = inv ? int'($urandom % 801) - 400 : int'($urandom % 511) - 255;
    if (!inv) begin
      for (int k = 0; k < n; k++)
        for (int j = 0; j < 8; j++) begin
          int s;
          s = 0;
          if (b8) begin
            for (int r = 0; r < 8; r++)
              for (int c = 0; c < 8; c++) s += A8[k][r] * X[r][c] * A8[j][c];
            E[k][j] = (s + 32) >>> 6;
          end else begin
            for (int r = 0; r < 4; r++)
              for (int c = 0; c < 4; c++) s += A4[k][r] * X[r][(j / 4) * 4 + c] * A4[j % 4][c];
            E[k][j] = s;
          end
        end
    end else begin
      int T [8][8];
      if (b8) begin
        int v [8], o [8];
        for (int r = 0; r < 8; r++) begin
          for (int c = 0; c < 8; c++) v[c] = X[r][c];
          idct8(v, o);
          for (int c = 0; c < 8; c++) T[r][c] = o[c];
        end
        for (int c = 0; c < 8; c++) begin
          for (int r = 0; r < 8; r++) v[r] = T[r][c];
          idct8(v, o);
          for (int r = 0; r < 8; r++) E[c][r] = (o[r] + 32) >>> 6;   // word c, lane r
        end
      end else begin
        int v [4], o [4];
        for (int h = 0; h < 2; h++) begin
          for (int r = 0; r < 4; r++) begin
            for (int c = 0; c < 4; c++) v[c] = X[r][4 * h + c];
            idct4(v, o);
            for (int c = 0; c < 4; c++) T[r][4 * h + c] = o[c];
          end
          for (int c = 0; c < 4; c++) begin
            for (int r = 0; r < 4; r++) v[r] = T[r][4 * h + c];
            idct4(v, o);
            for (int r = 0; r < 4; r++) E[c][4 * h + r] = (o[r] + 32) >>> 6;
          end
        end
      end
    end
    for (int r = 0; r < n; r++)
      for (int j = 0; j < 8; j++) exp_q.push_back(E[r][j]);
    for (int r = 0; r < n; r++) begin
      @(negedge clk);
      in_valid = 0;
      while (!in_ready) @(negedge clk);
      in_valid = 1; in_inv = inv; in_blk8 = b8;
      in_tag = '0; in_tag.blk = 4'(r); in_tag.mode = 4'($urandom % 9);
      for (int c = 0; c < 8; c++) in_data[c] = coef_t'(X[r][c]);
      // N + 1 cycles after its input row, or right after the previous word
      // when pass 2 is still busy with a larger block
      last_t = (cycle + n + 1 > last_t + 1) ? cycle + n + 1 : last_t + 1;
      exp_t.push_back(last_t);
    end
  endtask

  // output monitor
  always @(posedge clk) begin
    #2;
    if (out_valid) begin
      int w [8];
      int t;
      if (exp_q.size() < 8) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        for (int j = 0; j < 8; j++) w[j] = exp_q.pop_front();
        t = exp_t.pop_front();
        for (int j = 0; j < 8; j++) begin
          checks++;
          if (int'(out_data[j]) != w[j]) begin
            failures++;
            if (failures < 10) $display("FAIL lane %0d: %0d expected %0d", j, out_data[j], w[j]);
          end
        end
        checks++;
        if (cycle != t) begin
          failures++;
          if (failures < 10) $display("FAIL latency: at %0d expected %0d", cycle, t);
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cfg = 0; cfg < 4; cfg++)
      for (int b = 0; b < 6; b++) send_block(cfg[1], cfg[0]);
    @(negedge clk);
    in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d words never came out", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
