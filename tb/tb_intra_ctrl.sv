// tb_intra_ctrl: the macroblock controller against a model of the two-stage
// schedule. A stand-in transform accepts rows with a random ready signal,
// reports busy for a few clocks after the last accepted row, and signals the
// end of a reconstruction job's write-back a random number of clocks after
// its last row. Every accepted row (job descriptor and row number) is
// compared with the expected sequence, for Intra_4x4, Intra_8x8 and inter
// macroblocks; the clear / decide / done pulses and, with the transform
// always ready, the document's cycle budget of the prediction stage
// (4 + 288 + 288 + 48 = 628 clocks from start to decision) are checked too.
module tb_intra_ctrl;
  import intra_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic       rst_n = 0, start = 0, inter = 0, use_i8 = 0;
  logic       tx_ready = 0, tx_busy = 0, job_done = 0;
  logic       md_clear, issue, decide, busy, done;
  job_t       job;
  logic [2:0] row;
  int checks = 0, failures = 0;

  intra_ctrl dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // expected rows: {recon, inter, kind, blk, mode, hi_uv, uv_blk, hi_off, row}
  typedef struct packed {
    logic       recon, inter;
    logic [1:0] kind;
    logic [3:0] blk, mode;
    logic       hi_uv;
    logic [2:0] uv_blk;
    logic       hi_off;
    logic [2:0] row;
  } exp_t;
  exp_t q [$];

  function automatic exp_t mk(bit rc, bit it, int kind, int blk, int mode, int r);
    exp_t e;
    e = '0;
    e.recon = rc; e.inter = it; e.kind = 2'(kind); e.blk = 4'(blk); e.mode = 4'(mode);
    e.row = 3'(r);
    return e;
  endfunction

  task automatic build(bit it, bit i8);
    exp_t e;
    q.delete();
    if (!it) begin
      for (int p = 0; p < 8; p++) for (int m = 0; m < 9; m++) for (int r = 0; r < 4; r++)
        q.push_back(mk(0, 0, JOB_I4, p, m, r));
      for (int b = 0; b < 4; b++) for (int m = 0; m < 9; m++) for (int r = 0; r < 8; r++)
        q.push_back(mk(0, 0, JOB_I8, b, m, r));
      for (int m = 0; m < 3; m++) for (int j = 0; j < 4; j++) for (int r = 0; r < 4; r++)
        q.push_back(mk(0, 0, JOB_UV, j, m, r));
    end
    if (!it && !i8) begin
      for (int b = 0; b < 16; b++) for (int r = 0; r < 4; r++) begin
        e = mk(1, 0, JOB_I4, b, 0, r);
        e.hi_uv = (b < 8); e.hi_off = (b >= 8); e.uv_blk = 3'(b % 8);
        q.push_back(e);
      end
    end else begin
      for (int b = 0; b < 4; b++) for (int r = 0; r < 8; r++) q.push_back(mk(1, it, JOB_I8, b, 0, r));
      for (int j = 0; j < 4; j++) for (int r = 0; r < 4; r++) q.push_back(mk(1, it, JOB_UV, j, 0, r));
    end
  endtask

  int n_done, n_clear, n_decide, t_start, t_decide;
  bit rnd_ready;
  int busy_cnt, wb_cnt;

  // stand-in transform and write-back
  always @(negedge clk) begin
    tx_ready = rnd_ready ? ($urandom % 3 != 0) : 1'b1;
    tx_busy  = busy_cnt > 0;
    job_done = (wb_cnt == 1);
  end

  always @(posedge clk) begin
    if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
    if (wb_cnt > 0) wb_cnt <= wb_cnt - 1;
    if (md_clear) n_clear++;
    if (decide) begin n_decide++; t_decide = $time / 10; end
    if (done) n_done++;
    if (issue && tx_ready) begin
      exp_t g, e;
      g = '0;
      g.recon = job.recon; g.inter = job.inter; g.kind = job.kind; g.blk = job.blk;
      g.mode = job.recon ? 4'd0 : job.mode; g.hi_uv = job.hi_uv; g.uv_blk = job.uv_blk;
      g.hi_off = job.hi_off; g.row = row;
      if (q.size() == 0) chk(0, "unexpected row");
      else begin
        e = q.pop_front();
        chk(g == e, $sformatf("row %h expected %h", g, e));
      end
      busy_cnt <= 5;
      if (job.recon && row == 3'(job_rows(job) - 1)) wb_cnt <= 3 + int'($urandom % 20);
    end
  end

  initial begin
    busy_cnt = 0; wb_cnt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mb = 0; mb < 6; mb++) begin
      bit it, i8;
      it = (mb == 4);
      i8 = mb[0];
      rnd_ready = (mb >= 2);
      build(it, i8);
      n_done = 0; n_clear = 0; n_decide = 0;
      @(negedge clk);
      start = 1; inter = it; use_i8 = i8;
      t_start = $time / 10;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      chk(q.size() == 0, "rows missing");
      chk(n_done == 1, "done pulses");
      chk(n_clear == (it ? 0 : 1), "clear pulses");
      chk(n_decide == (it ? 0 : 1), "decide pulses");
      chk(!busy, "idle after done");
      // with the transform always ready: 1 clear + 624 rows + drain + decide
      if (!rnd_ready && !it)
        chk(t_decide - t_start <= 628 + 8, $sformatf("prediction stage %0d clocks", t_decide - t_start));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
