// intra_top: H.264/AVC high profile intra prediction and reconstruction for
// one macroblock (MB) at a time, eight pixels per clock.
//
// Datapath (Fig. 8 of the architecture):
//   current MB buffer --> predictor assigner --> luma predictor  --+
//                                                chroma predictor -+-> MUX
//   MC data buffer (inter MBs) ------------------------------------+
//   MUX -> DIFF (original - prediction) -> MUX -> multi-transform -> mode
//   decision (prediction stage) or Q -> IQ -> back through the MUX into the
//   multi-transform as IDCT -> + prediction -> reconstructed pixel buffer.
//   Quantised levels are also written to the coefficient buffer for the
//   entropy coder, which is outside this design.
// The controller runs the two-stage schedule (see intra_ctrl): an open-loop
// prediction stage that tries all Intra_4x4, Intra_8x8 and chroma modes with
// original pixels as in-MB neighbours, then a closed-loop reconstruction
// stage for the chosen one only. An inter MB skips the first stage and is
// reconstructed from the MC data buffer with the 8x8 transform.
//
// Interface: load the current MB (and, for inter, the MC data) one 64-bit
// word per clock through the write ports, present the reconstructed row
// above the MB (up_*) and the availability flags, then pulse `start` with
// `qp` and `inter` valid. `done` pulses when the reconstructed pixels and
// the levels can be read through rec_rd_* and coef_rd_*. The column left of
// the MB is taken from the previous MB's reconstruction at `done`, so MBs of
// one row are expected in raster order (mb_left says whether that column
// exists). The chroma DC terms take the standard's extra 2x2 transform
// path through the UV DC buffer (uv_dc_buffer), whose results replace the
// DC position of each chroma block on the way back into the inverse
// transform and into the coefficient buffer. Chroma plane prediction is not
// supported.
module intra_top
  import intra_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // loading
  input  logic         cur_wr_en,
  input  logic [5:0]   cur_wr_addr,
  input  word_t        cur_wr_data,
  input  logic         mc_wr_en,
  input  logic [5:0]   mc_wr_addr,
  input  word_t        mc_wr_data,
  // neighbours from the upper-row store (reconstructed)
  input  pix_t         up_luma [25],    // x = -1 .. 23
  input  pix_t [7:0]   up_u,            // x = 0 .. 7
  input  pix_t [7:0]   up_v,
  input  logic         mb_top,
  input  logic         mb_left,
  input  logic         mb_topleft,
  input  logic         mb_topright,
  // control
  input  logic         start,
  input  logic         inter,
  input  logic [5:0]   qp,
  output logic         busy,
  output logic         done,
  // decisions
  output logic         mb_i8,           // Intra_8x8 chosen (else Intra_4x4)
  output logic [3:0]   best4 [16],
  output logic [3:0]   best8 [4],
  output logic [3:0]   best_uv,
  output logic [23:0]  cost_i4,
  output logic [23:0]  cost_i8,
  output logic [23:0]  cost_uv,
  // results
  input  logic [5:0]   rec_rd_addr,
  output word_t        rec_rd_data,
  input  logic [5:0]   coef_rd_addr,
  output coef_t [7:0]  coef_rd_data
);

  // ---------------- buffers -----------------------------------------------
  word_t cur_mem [48];
  word_t mc_mem  [48];
  word_t rec_mem [48];
  word_t cur_rd_unused, mc_rd_unused;

  mb_buffer u_cur (.clk, .wr_en(cur_wr_en), .wr_addr(cur_wr_addr), .wr_data(cur_wr_data),
                   .rd_addr(6'd0), .rd_data(cur_rd_unused), .contents(cur_mem));
  mb_buffer u_mc  (.clk, .wr_en(mc_wr_en), .wr_addr(mc_wr_addr), .wr_data(mc_wr_data),
                   .rd_addr(6'd0), .rd_data(mc_rd_unused), .contents(mc_mem));

  logic [7:0]       rec_we;
  logic [7:0][5:0]  rec_word;
  logic [7:0][2:0]  rec_lane;
  pix_t [7:0]       rec_pix;
  recon_buffer u_rec (.clk, .wr_en(rec_we), .wr_word(rec_word), .wr_lane(rec_lane),
                      .wr_pix(rec_pix), .rd_addr(rec_rd_addr), .rd_data(rec_rd_data),
                      .contents(rec_mem));

  logic [7:0]       cf_we;
  logic [7:0][5:0]  cf_word;
  logic [7:0][2:0]  cf_lane;
  coef_t [7:0]      levels, lv_fb;
  coef_buffer u_coef (.clk, .wr_en(cf_we), .wr_word(cf_word), .wr_lane(cf_lane),
                      .wr_data(lv_fb), .rd_addr(coef_rd_addr), .rd_data(coef_rd_data));

  // left neighbours: right column of the previous MB's reconstruction
  pix_t lf_luma [16];
  pix_t [7:0] lf_u, lf_v;

  // ---------------- controller ---------------------------------------------
  logic        md_clear, decide, issue, tx_ready, tx_busy, job_done, use_i8;
  logic        feedback;
  job_t        job;
  logic [2:0]  row;

  intra_ctrl u_ctrl (.clk, .rst_n, .start, .inter, .use_i8,
                     .tx_ready(tx_ready && !feedback), .tx_busy, .job_done,
                     .md_clear, .decide, .issue, .job, .row, .busy, .done);

  // ---------------- prediction ---------------------------------------------
  nbr_t        nb_lo, nb_hi;
  pix_t [7:0]  lpred, cpred, pred;
  logic        lok_lo, lok_hi, cok;
  logic [3:0]  lmode, cmode;
  logic [2:0]  crow;
  logic        ccomp;

  predictor_assigner u_pa (.job, .orig(cur_mem), .recon(rec_mem), .up(up_luma), .lf(lf_luma),
                           .mb_top, .mb_left, .mb_topleft, .mb_topright, .nb_lo, .nb_hi);

  always_comb begin
    if (!job.recon)              lmode = job.mode;
    else if (job.kind == JOB_I8) lmode = best8[job.blk[1:0]];
    else                         lmode = best4[job.blk];
    cmode = job.recon ? best_uv : job.mode;
    if (job.kind == JOB_UV) begin
      ccomp = job.blk[1];
      crow  = {job.blk[0], row[1:0]};
    end else begin
      ccomp = job.uv_blk[2];
      crow  = {job.uv_blk[1], row[1:0]};
    end
  end

  luma_predictor u_lp (.blk8(job.kind == JOB_I8), .mode(lmode), .row, .nb_lo, .nb_hi,
                       .pred(lpred), .ok_lo(lok_lo), .ok_hi(lok_hi));

  chroma_predictor u_cp (.mode(cmode), .row(crow), .top(ccomp ? up_v : up_u),
                         .left(ccomp ? lf_v : lf_u), .a_top(mb_top), .a_left(mb_left),
                         .pred(cpred), .ok(cok));

  // predictor MUX and DIFF
  coef_t [7:0] resid;
  job_t        tag;
  always_comb begin
    tag = job;
    for (int l = 0; l < 8; l++) begin
      logic [8:0] ps;
      ps = job_pos(job, int'(row), l);
      if (job.inter)
        pred[l] = mc_mem[ps[8:3]][ps[2:0]];
      else if (job.kind == JOB_UV)
        pred[l] = cpred[l];
      else if (job.kind == JOB_I4 && job.recon && l >= 4)
        pred[l] = job.hi_uv ? cpred[4 * int'(job.uv_blk[0]) + l - 4] : 8'd0;
      else
        pred[l] = lpred[l];
      if (job.hi_off && l >= 4)
        resid[l] = '0;
      else
        resid[l] = coef_t'(int'(cur_mem[ps[8:3]][ps[2:0]]) - int'(pred[l]));
    end
    if (job.kind == JOB_UV) begin
      tag.ok_lo = cok;
      tag.ok_hi = cok;
    end else begin
      tag.ok_lo = lok_lo;
      tag.ok_hi = lok_hi;
    end
  end

  // prediction kept for the reconstruction of the current job
  pix_t [7:0] pred_buf [8];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pred_buf <= '{default: '0};
    else if (issue && tx_ready && !feedback && job.recon) pred_buf[row] <= pred;

  // ---------------- transform, Q, IQ ----------------------------------------
  logic         tx_ov, tx_olast, tx_oinv, tx_oblk8;
  logic [2:0]   tx_oidx;
  job_t         tx_otag;
  coef_t [7:0]  tx_odata, deq, deq_fb, tx_in;
  logic [7:0]   ch_lanes;

  assign feedback = tx_ov && !tx_oinv && tx_otag.recon;
  assign tx_in    = feedback ? deq_fb : resid;

  multi_transform u_tx (.clk, .rst_n,
                        .in_valid(feedback || issue), .in_ready(tx_ready),
                        .in_inv(feedback),
                        .in_blk8(feedback ? tx_oblk8 : (job.kind == JOB_I8)),
                        .in_tag(feedback ? tx_otag : tag), .in_data(tx_in),
                        .out_valid(tx_ov), .out_idx(tx_oidx), .out_last(tx_olast),
                        .out_inv(tx_oinv), .out_blk8(tx_oblk8), .out_tag(tx_otag),
                        .out_data(tx_odata), .busy(tx_busy));

  always_comb begin
    if (tx_otag.kind == JOB_UV)                      ch_lanes = 8'hFF;
    else if (tx_otag.kind == JOB_I4 && tx_otag.hi_uv) ch_lanes = 8'hF0;
    else                                             ch_lanes = 8'h00;
  end

  quantizer u_q (.blk8(tx_oblk8), .k(tx_oidx), .qp, .chroma(ch_lanes),
                 .inter(tx_otag.inter), .coef(tx_odata), .level(levels));

  inv_quantizer u_iq (.blk8(tx_oblk8), .k(tx_oidx), .qp, .chroma(ch_lanes),
                      .level(levels), .coef(deq));

  // chroma DC: the values of the 2x2 DC transform path replace the level
  // and the dequantised value at position (0,0) of every chroma block
  coef_t dc_level [8], dc_coef [8];
  logic  dc_capture, dc_inter;
  assign dc_inter   = start && !busy && inter;
  assign dc_capture = decide || dc_inter;

  uv_dc_buffer u_uvdc (.clk, .rst_n, .capture(dc_capture), .inter(dc_inter), .qp,
                       .cur(cur_mem), .mc(mc_mem), .mode(best_uv), .up_u, .up_v,
                       .lf_u, .lf_v, .a_top(mb_top), .a_left(mb_left),
                       .dc_level, .dc_coef);

  always_comb begin
    deq_fb = deq;
    lv_fb  = levels;
    for (int l = 0; l < 8; l += 4) begin
      logic [2:0] k;
      if (tx_otag.kind == JOB_UV) k = {tx_otag.blk[1], tx_otag.blk[0], 1'(l / 4)};
      else                        k = tx_otag.uv_blk;
      if (!tx_oblk8 && tx_oidx == 3'd0 && ch_lanes[l]) begin
        deq_fb[l] = dc_coef[k];
        lv_fb[l]  = dc_level[k];
      end
    end
  end

  // coefficient buffer write
  always_comb begin
    for (int l = 0; l < 8; l++) begin
      logic [8:0] ps;
      ps = job_pos(tx_otag, int'(tx_oidx), l);
      cf_we[l]   = feedback && !(tx_otag.hi_off && l >= 4);
      cf_word[l] = ps[8:3];
      cf_lane[l] = ps[2:0];
    end
  end

  // ---------------- mode decision -------------------------------------------
  mode_decision u_md (.clk, .rst_n, .clear(md_clear), .qp, .in_valid(tx_ov), .in_idx(tx_oidx),
                      .in_last(tx_olast), .in_inv(tx_oinv), .in_tag(tx_otag),
                      .in_data(tx_odata), .best4, .best8, .best_uv, .cost_i4, .cost_i8,
                      .cost_uv, .use_i8);

  // ---------------- reconstruction write-back -------------------------------
  always_comb begin
    for (int l = 0; l < 8; l++) begin
      int unsigned rr, jl;
      logic [8:0] ps;
      if (tx_oblk8 || l < 4) begin
        rr = l;
        jl = int'(tx_oidx);
      end else begin
        rr = l - 4;
        jl = 4 + int'(tx_oidx);
      end
      ps = job_pos(tx_otag, rr, jl);
      rec_we[l]   = tx_ov && tx_oinv && tx_otag.recon && !(tx_otag.hi_off && l >= 4);
      rec_word[l] = ps[8:3];
      rec_lane[l] = ps[2:0];
      rec_pix[l]  = clip8(int'(pred_buf[rr][jl]) + int'(tx_odata[l]));
    end
  end
  assign job_done = tx_ov && tx_oinv && tx_olast && tx_otag.recon;

  // ---------------- MB-level state ------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lf_luma <= '{default: '0};
      lf_u    <= '0;
      lf_v    <= '0;
      mb_i8   <= 1'b0;
    end else begin
      if (start && !busy) mb_i8 <= 1'b0;
      if (decide) mb_i8 <= use_i8;
      if (done) begin
        for (int y = 0; y < 16; y++) lf_luma[y] <= rec_mem[2 * y + 1][7];
        for (int y = 0; y < 8; y++) begin
          lf_u[y] <= rec_mem[32 + y][7];
          lf_v[y] <= rec_mem[40 + y][7];
        end
      end
    end
  end

endmodule
