// mode_decision: DCT-based SATD cost, best mode per sub-block and MB cost.
//
// During the open-loop prediction stage every residual block is forward
// transformed and its coefficients stream past this unit one row per clock
// (the multi-transform output, with the job descriptor as tag). The cost of
// a block is
//   4x4 (luma and chroma): sum over (i,j) of |Y(i,j)| * S(i,j) / 2, with
//     S = 2 where i and j are both even, 1 elsewhere (the document's
//     simplified scaling matrix, equation (1));
//   8x8: sum of |Y(i,j)| / 2, with no position-dependent scaling (the
//     document: "we do not apply any scaling matrix on it"); the overall
//     division by 2 is this design's choice and puts the 8x8 cost on the same
//     scale as the 4x4 one (the 8x8 transform has twice the gain).
// When the last row of a job has passed, the cost of each of its blocks is
// compared with the best so far and, if lower and the mode was usable with
// the available neighbours, becomes the new best (ties keep the lower mode
// number). The chroma cost of a mode is the sum over the four jobs that make
// up U and V. Only the best mode of each sub-block and its cost are kept (the
// "best mode register"); their sums give the Intra_4x4 and Intra_8x8 MB
// costs after a header penalty of 4 * lambda(QP) per sub-block is added
// (16 for Intra_4x4, 4 for Intra_8x8; lambda is the QP2QUANT table of the
// H.264 reference encoder, this design's choice, which makes larger blocks
// win as QP grows), and use_i8 says which of the two is lower (Intra_16x16 is not
// supported, as in the document).
//
// `clear` (one clock) resets all best costs before a macroblock.
module mode_decision
  import intra_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [5:0]   qp,
  input  logic         in_valid,
  input  logic [2:0]   in_idx,
  input  logic         in_last,
  input  logic         in_inv,
  input  job_t         in_tag,
  input  coef_t [7:0]  in_data,
  output logic [3:0]   best4    [16],
  output logic [3:0]   best8    [4],
  output logic [3:0]   best_uv,
  output logic [23:0]  cost_i4,
  output logic [23:0]  cost_i8,
  output logic [23:0]  cost_uv,
  output logic         use_i8
);

  localparam logic [23:0] MAXC = 24'hFFFFFF;

  logic [23:0] c4 [16];
  logic [23:0] c8 [4];
  logic [23:0] acc_lo, acc_hi, acc_uv;

  logic        take;
  logic [23:0] row_lo, row_hi, new_lo, new_hi;

  function automatic int unsigned absv(coef_t v);
    return (v < 0) ? int'(-int'(v)) : int'(v);
  endfunction

  assign take = in_valid && !in_inv && !in_tag.recon;

  always_comb begin
    int unsigned sl, sh, w;
    sl = 0;
    sh = 0;
    w  = 1;
    if (in_tag.kind == JOB_I8) begin
      for (int l = 0; l < 8; l++) sl += absv(in_data[l]);
    end else begin
      for (int l = 0; l < 4; l++) begin
        w = (in_idx[0] == 1'b0 && (l % 2) == 0) ? 2 : 1;
        sl += w * absv(in_data[l]);
        sh += w * absv(in_data[l + 4]);
      end
    end
    row_lo = 24'(sl);
    row_hi = 24'(sh);
    new_lo = ((in_idx == 3'd0) ? 24'd0 : acc_lo) + row_lo;
    new_hi = ((in_idx == 3'd0) ? 24'd0 : acc_hi) + row_hi;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c4      <= '{default: MAXC};
      c8      <= '{default: MAXC};
      best4   <= '{default: 4'd2};
      best8   <= '{default: 4'd2};
      best_uv <= CM_DC;
      cost_uv <= MAXC;
      acc_lo  <= '0;
      acc_hi  <= '0;
      acc_uv  <= '0;
    end else if (clear) begin
      c4      <= '{default: MAXC};
      c8      <= '{default: MAXC};
      best4   <= '{default: 4'd2};
      best8   <= '{default: 4'd2};
      best_uv <= CM_DC;
      cost_uv <= MAXC;
      acc_uv  <= '0;
    end else if (take) begin
      acc_lo <= new_lo;
      acc_hi <= new_hi;
      if (in_last) begin
        case (in_tag.kind)
          JOB_I8: begin
            if (in_tag.ok_lo && (new_lo >> 1) < c8[in_tag.blk[1:0]]) begin
              c8[in_tag.blk[1:0]]    <= new_lo >> 1;
              best8[in_tag.blk[1:0]] <= in_tag.mode;
            end
          end
          JOB_I4: begin
            if (in_tag.ok_lo && (new_lo >> 1) < c4[{in_tag.blk[2:0], 1'b0}]) begin
              c4[{in_tag.blk[2:0], 1'b0}]    <= new_lo >> 1;
              best4[{in_tag.blk[2:0], 1'b0}] <= in_tag.mode;
            end
            if (in_tag.ok_hi && (new_hi >> 1) < c4[{in_tag.blk[2:0], 1'b1}]) begin
              c4[{in_tag.blk[2:0], 1'b1}]    <= new_hi >> 1;
              best4[{in_tag.blk[2:0], 1'b1}] <= in_tag.mode;
            end
          end
          JOB_UV: begin
            logic [23:0] tot;
            tot = ((in_tag.blk[1:0] == 2'd0) ? 24'd0 : acc_uv) + (new_lo >> 1) + (new_hi >> 1);
            acc_uv <= tot;
            if (in_tag.blk[1:0] == 2'd3 && in_tag.ok_lo && tot < cost_uv) begin
              cost_uv <= tot;
              best_uv <= in_tag.mode;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // lambda of the mode-header penalty, QP2QUANT[max(0, QP - 12)]
  function automatic logic [29:0] lambda(logic [5:0] q);
    logic [6:0] t [40];
    t = '{7'd1, 7'd1, 7'd1, 7'd1, 7'd2, 7'd2, 7'd2, 7'd2, 7'd3, 7'd3, 7'd3, 7'd4, 7'd4,
          7'd4, 7'd5, 7'd6, 7'd6, 7'd7, 7'd8, 7'd9, 7'd10, 7'd11, 7'd13, 7'd14, 7'd16,
          7'd18, 7'd20, 7'd23, 7'd25, 7'd29, 7'd32, 7'd36, 7'd40, 7'd45, 7'd51, 7'd57,
          7'd64, 7'd72, 7'd81, 7'd91};
    if (q < 6'd12) return 30'(t[0]);
    if (q > 6'd51) return 30'(t[39]);
    return 30'(t[6'(q - 6'd12)]);
  endfunction

  always_comb begin
    logic [29:0] s4, s8;
    s4 = 30'd64 * lambda(qp);
    s8 = 30'd16 * lambda(qp);
    for (int b = 0; b < 16; b++) s4 += 30'(c4[b]);
    for (int b = 0; b < 4; b++)  s8 += 30'(c8[b]);
    cost_i4 = (s4 > 30'(MAXC)) ? MAXC : s4[23:0];
    cost_i8 = (s8 > 30'(MAXC)) ? MAXC : s8[23:0];
    use_i8  = (cost_i8 < cost_i4);
  end

endmodule
