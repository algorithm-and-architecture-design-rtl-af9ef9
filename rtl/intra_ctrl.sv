// intra_ctrl: macroblock controller for the two-stage schedule.
//
// Stage 1, open-loop prediction (intra MBs only), issues one row per clock:
//   Intra_4x4: 8 pairs of 4x4 blocks x 9 modes x 4 rows   = 288 rows
//   Intra_8x8: 4 blocks x 9 modes x 8 rows                = 288 rows
//   chroma:    3 modes x (U, V) x 2 pairs of 4x4 x 4 rows = 48 rows
// Because the prediction is open loop no job waits for another, so rows are
// issued back to back (a row waits only while the transform has no free
// buffer, which happens once, at the 8x8 -> 4x4 change). The controller then
// waits for the transform to drain and gives the mode decision one clock.
// Stage 2, closed-loop reconstruction, issues one job at a time and waits for
// its reconstructed pixels to be written back (job_done) before the next,
// since each block needs its reconstructed neighbours:
//   Intra_4x4 chosen: luma 4x4 blocks 0..15 in zig-zag order, each with a
//     chroma 4x4 block (U0..U3, V0..V3) in lanes 4..7 for the first eight;
//   Intra_8x8 chosen or inter MB: luma 8x8 blocks 0..3, then U and V as
//     pairs of 4x4 blocks.
// done pulses for one clock at the end. The schedule follows Fig. 9 of the
// document; the handshakes are this design's own.
module intra_ctrl
  import intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        inter,       // reconstruct an inter MB, no prediction
  input  logic        use_i8,      // from mode decision
  input  logic        tx_ready,    // transform can take a row
  input  logic        tx_busy,     // transform still holds or emits data
  input  logic        job_done,    // write-back of a reconstruction job ended
  output logic        md_clear,
  output logic        issue,
  output job_t        job,
  output logic [2:0]  row,
  output logic        decide,      // one clock: the MB decision is taken
  output logic        busy,
  output logic        done
);

  typedef enum logic [3:0] {
    S_IDLE, S_CLEAR, S_P_I4, S_P_I8, S_P_UV, S_DRAIN, S_DECIDE,
    S_R_ISSUE, S_R_WAIT, S_DONE
  } state_e;

  state_e      state;
  logic [3:0]  blk;
  logic [3:0]  mode;
  logic [2:0]  r;
  logic        inter_q, i8_q;

  // number of reconstruction jobs
  logic [4:0]  n_rjobs;
  assign n_rjobs = (!inter_q && !i8_q) ? 5'd16 : 5'd8;

  always_comb begin
    job   = '0;
    issue = 1'b0;
    row   = r;
    case (state)
      S_P_I4: begin
        job.kind = JOB_I4; job.blk = blk; job.mode = mode;
        issue = 1'b1;
      end
      S_P_I8: begin
        job.kind = JOB_I8; job.blk = blk; job.mode = mode;
        issue = 1'b1;
      end
      S_P_UV: begin
        job.kind = JOB_UV; job.blk = blk; job.mode = mode;
        issue = 1'b1;
      end
      S_R_ISSUE: begin
        job.recon = 1'b1;
        job.inter = inter_q;
        if (!inter_q && !i8_q) begin
          job.kind   = JOB_I4;
          job.blk    = blk;
          job.hi_uv  = !blk[3];
          job.hi_off = blk[3];
          job.uv_blk = blk[2:0];
        end else if (!blk[2]) begin
          job.kind = JOB_I8;
          job.blk  = {2'b00, blk[1:0]};
        end else begin
          job.kind = JOB_UV;
          job.blk  = {2'b00, blk[1:0]};
        end
        issue = 1'b1;
      end
      default: ;
    endcase
  end

  assign md_clear = (state == S_CLEAR);
  assign busy     = (state != S_IDLE);
  assign decide   = (state == S_DECIDE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      blk     <= '0;
      mode    <= '0;
      r       <= '0;
      inter_q <= 1'b0;
      i8_q    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          inter_q <= inter;
          i8_q    <= 1'b0;
          blk     <= '0;
          mode    <= '0;
          r       <= '0;
          state   <= inter ? S_R_ISSUE : S_CLEAR;
        end
        S_CLEAR: state <= S_P_I4;
        S_P_I4, S_P_I8, S_P_UV: if (tx_ready) begin
          logic [2:0] rmax;
          logic [3:0] mmax, bmax;
          rmax = (state == S_P_I8) ? 3'd7 : 3'd3;
          mmax = (state == S_P_UV) ? 4'(N_CHROMA_MODES - 1) : 4'd8;
          bmax = (state == S_P_I4) ? 4'd7 : 4'd3;
          if (r != rmax) r <= r + 3'd1;
          else begin
            r <= '0;
            if (state == S_P_UV) begin
              // chroma: the four jobs of one mode, then the next mode
              if (blk != bmax) blk <= blk + 4'd1;
              else begin
                blk <= '0;
                if (mode != mmax) mode <= mode + 4'd1;
                else state <= S_DRAIN;
              end
            end else begin
              // luma: all modes of one block (pair), then the next
              if (mode != mmax) mode <= mode + 4'd1;
              else begin
                mode <= '0;
                if (blk != bmax) blk <= blk + 4'd1;
                else begin
                  blk   <= '0;
                  state <= (state == S_P_I4) ? S_P_I8 : S_P_UV;
                end
              end
            end
          end
        end
        S_DRAIN:  if (!tx_busy) state <= S_DECIDE;
        S_DECIDE: begin
          i8_q  <= use_i8;
          blk   <= '0;
          r     <= '0;
          state <= S_R_ISSUE;
        end
        S_R_ISSUE: if (tx_ready) begin
          logic [2:0] rmax;
          rmax = (!inter_q && !i8_q) ? 3'd3 : (!blk[2] ? 3'd7 : 3'd3);
          if (r != rmax) r <= r + 3'd1;
          else begin
            r     <= '0;
            state <= S_R_WAIT;
          end
        end
        S_R_WAIT: if (job_done) begin
          if (5'(blk) + 5'd1 == n_rjobs) state <= S_DONE;
          else begin
            blk   <= blk + 4'd1;
            state <= S_R_ISSUE;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
