// mbp_s2_ctl: fine-prediction stage controller (MB pipeline stage 2).
//
// On each tick with a valid MB it examines, one cycle after go (when the top
// has loaded it), the MB coding information from stage
// 1. A pre-skipped MB becomes a skip MB at the MV predictor. Otherwise, for
// every partition mode selected by the pre-mode decision and every partition
// of it, it starts the FME engine around that partition's IME result, in the
// reference frame the IME chose for it (fme_ref), and
// writes the refined MV and cost into the best inter-mode information buffer;
// the Lagrangian mode decision over the buffer gives the MB result, which
// also carries each partition's reference index.
// The FME is only started while stage 1 does not hold it (fme_busy_s1 low).
// The mode rate term (mode_bits) is charged on the first partition only:
// 1, 3, 3 and 7 bits for 16x16, 16x8, 8x16 and 8x8 (ue(v) of mb_type, plus
// four one-bit sub-types for 8x8). The reference term is te(v) of index 0:
// 0 bits with one reference, 1 bit with two. done pulses once per tick.
// Partition order and the cost terms are this design's choices.
module mbp_s2_ctl
  import enc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     go,
  input  logic     valid,
  input  param_t   prm,
  input  mb_info_t info,
  // FME
  input  logic     fme_busy_s1,
  output logic     fme_start,
  output logic [1:0] p_x,
  output logic [1:0] p_y,
  output logic [2:0] p_w,
  output logic [2:0] p_h,
  output imv_t     center,
  output logic     fme_ref,       // reference frame of the partition
  output qmv_t     mvp_q,
  output logic [3:0] ref_bits,
  output logic [3:0] mode_bits,
  input  logic     fme_done,      // FME result goes straight to the buffer
  // best inter-mode information buffer
  output logic     buf_clr,
  output logic     buf_wr,
  output pmode_e   buf_mode,
  output logic [1:0] buf_part,
  input  pmode_e   best_mode,
  input  qmv_t     best_mv [4],
  input  logic [23:0] best_cost,
  // result
  output mb_res_t  res,
  output logic     done
);
  typedef enum logic [2:0] {B_IDLE, B_START, B_NEXT, B_GRANT, B_WAIT, B_DECIDE, B_DONE} bstate_e;
  bstate_e state;
  logic [1:0] m, p;

  assign mvp_q    = '{x: 10'(int'(info.mvp.x) * 4), y: 10'(int'(info.mvp.y) * 4)};
  assign ref_bits = (prm.n_ref > 2'd1) ? 4'd1 : 4'd0;
  assign buf_mode = pmode_e'({1'b0, m});
  assign buf_part = p;
  // the result is written in the done cycle, while m and p still name it
  assign buf_wr   = (state == B_WAIT) && fme_done;

  always_comb begin
    unique case (m)
      2'd0: begin p_x = 2'd0;      p_y = 2'd0;      p_w = 3'd4; p_h = 3'd4; end
      2'd1: begin p_x = 2'd0;      p_y = {p[0], 1'b0}; p_w = 3'd4; p_h = 3'd2; end
      2'd2: begin p_x = {p[0], 1'b0}; p_y = 2'd0;   p_w = 3'd2; p_h = 3'd4; end
      default: begin p_x = {p[0], 1'b0}; p_y = {p[1], 1'b0}; p_w = 3'd2; p_h = 3'd2; end
    endcase
    center  = info.imv[vbs_first(pmode_e'({1'b0, m})) + int'(p)];
    fme_ref = info.iref[vbs_first(pmode_e'({1'b0, m})) + int'(p)];
    if (p != 2'd0)      mode_bits = 4'd0;
    else if (m == 2'd0) mode_bits = 4'd1;
    else if (m == 2'd3) mode_bits = 4'd7;
    else                mode_bits = 4'd3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= B_IDLE; m <= '0; p <= '0;
      fme_start <= 1'b0; buf_clr <= 1'b0; res <= '0; done <= 1'b0;
    end else begin
      fme_start <= 1'b0;
      buf_clr   <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        B_IDLE: if (go) begin
          if (!valid) done <= 1'b1;
          else state <= B_START;
        end
        // info is loaded on the go edge, so it is examined one cycle later
        B_START: begin
          if (info.skip) begin
            res.mode <= PM_SKIP;
            for (int k = 0; k < 4; k++) res.mv[k] <= mvp_q;
            res.ref_idx <= '0;
            res.cost <= '0;
            state    <= B_DONE;
          end else begin
            buf_clr <= 1'b1;
            m <= '0;
            p <= '0;
            state <= B_NEXT;
          end
        end
        B_NEXT: begin
          // skip modes the pre-mode decision did not select
          if (!info.mode_sel[m]) begin
            if (m == 2'd3) state <= B_DECIDE;
            else m <= m + 2'd1;
          end else state <= B_GRANT;
        end
        B_GRANT: if (!fme_busy_s1) begin
          fme_start <= 1'b1;
          state     <= B_WAIT;
        end
        B_WAIT: if (fme_done) begin
          if (int'(p) + 1 == vbs_count(pmode_e'({1'b0, m}))) begin
            p <= '0;
            if (m == 2'd3) state <= B_DECIDE;
            else begin
              m <= m + 2'd1;
              state <= B_NEXT;
            end
          end else begin
            p <= p + 2'd1;
            state <= B_GRANT;
          end
        end
        B_DECIDE: begin
          res.mode <= best_mode;
          for (int k = 0; k < 4; k++) begin
            res.mv[k]      <= best_mv[k];
            res.ref_idx[k] <= (k < vbs_count(best_mode)) ? info.iref[vbs_first(best_mode) + k] : 1'b0;
          end
          res.cost <= best_cost;
          state <= B_DONE;
        end
        B_DONE: begin
          done  <= 1'b1;
          state <= B_IDLE;
        end
        default: state <= B_IDLE;
      endcase
    end
  end
endmodule
