// mbp_s1_ctl: coarse-prediction stage controller (MB pipeline stage 1).
//
// On each pipeline tick (go) with a valid MB it runs the first part of the
// power-aware flow:
//  1. pre-skip (if enabled): borrows the FME engine to compute the cost of the
//     16x16 block at the MV predictor; if that cost is below the threshold TH
//     the MB is coded as skip and IME and FME are not run for it;
//  2. content-aware multi-iteration four-step IME from n_init initial points,
//     once per reference frame (n_ref = 2: reference 0, then 1); for the nine
//     blocks of the 16x16..8x8 modes the cheaper reference is kept (ties go
//     to reference 0) with its MV and reference index;
//  3. pre-mode decision: ranks the partition modes 16x16, 16x8, 8x16 and 8x8
//     by their summed IME costs and keeps the n_vbs best for refinement.
// The results go to the MB coding-information register file (info), which
// the fine-prediction stage takes at the next tick. mvp is sampled at go
// into info.mvp, which is what the pre-skip and IME use during the tick. fme_req is high while the
// FME is used here; the fine-prediction stage waits for it to drop.
// done pulses once per tick (one cycle after go for an empty stage).
// The flow follows the published power-scalable algorithm; the initial-point list
// {mvp, (0,0), (-16,0), (+16,0)}, searching the references one after the
// other, and the ranking rule are this design's. Skip always refers to
// reference 0, as in H.264 P_Skip.
module mbp_s1_ctl
  import enc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     go,
  input  logic     valid,
  input  param_t   prm,
  input  imv_t     mvp,
  // FME (pre-skip)
  output logic     fme_req,
  output logic     fme_start,
  input  logic     fme_done,
  input  logic [21:0] fme_center_cost,
  // IME
  output logic     ime_start,
  output logic     ime_ref,       // reference frame the IME searches
  output imv_t     ime_init [4],
  input  logic     ime_done,
  input  cost_t    ime_cost [NUM_VBS],
  input  imv_t     ime_mv   [NUM_VBS],
  // results
  output mb_info_t info,
  output logic     skip_hit,      // pulse: pre-skip terminated this MB early
  output logic     done
);
  typedef enum logic [2:0] {A_IDLE, A_PS_WAIT, A_IME_WAIT, A_PMD, A_DONE} astate_e;
  astate_e state;

  assign ime_init[0] = info.mvp;
  assign ime_init[1] = '{x: 8'sd0,   y: 8'sd0};
  assign ime_init[2] = '{x: -8'sd16, y: 8'sd0};
  assign ime_init[3] = '{x: 8'sd16,  y: 8'sd0};

  // pre-mode decision
  // results of the reference searched first, kept for blocks 0..8
  cost_t      k_cost [9];
  imv_t       k_mv   [9];
  logic [8:0] k_ref;
  cost_t      m_cost [9];   // merged with the running search
  imv_t       m_mv   [9];
  logic [8:0] m_ref;
  always_comb
    for (int k = 0; k < 9; k++)
      if (ime_ref && k_cost[k] <= ime_cost[k]) begin   // ties keep reference 0
        m_cost[k] = k_cost[k]; m_mv[k] = k_mv[k]; m_ref[k] = k_ref[k];
      end else begin
        m_cost[k] = ime_cost[k]; m_mv[k] = ime_mv[k]; m_ref[k] = ime_ref;
      end

  logic [19:0] mcost [4];
  logic [3:0]  sel;
  always_comb begin
    mcost[0] = 20'(m_cost[0]);
    mcost[1] = 20'(m_cost[1]) + 20'(m_cost[2]);
    mcost[2] = 20'(m_cost[3]) + 20'(m_cost[4]);
    mcost[3] = 20'(m_cost[5]) + 20'(m_cost[6]) + 20'(m_cost[7]) + 20'(m_cost[8]);
    for (int m = 0; m < 4; m++) begin
      int rank;
      rank = 0;
      for (int k = 0; k < 4; k++)
        if (mcost[k] < mcost[m] || (mcost[k] == mcost[m] && k < m)) rank++;
      sel[m] = rank < int'(prm.n_vbs);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A_IDLE;
      fme_req <= 1'b0; fme_start <= 1'b0; ime_start <= 1'b0; ime_ref <= 1'b0;
      k_cost <= '{default: '0}; k_mv <= '{default: '0}; k_ref <= '0;
      info <= '0; skip_hit <= 1'b0; done <= 1'b0;
    end else begin
      fme_start <= 1'b0;
      ime_start <= 1'b0;
      skip_hit  <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        A_IDLE: if (go) begin
          if (!valid) begin
            done <= 1'b1;
          end else begin
            info.skip     <= 1'b0;
            info.mode_sel <= 4'b0001;
            info.mvp      <= mvp;
            info.iref     <= '0;
            ime_ref       <= 1'b0;
            if (prm.en_preskip) begin
              fme_req   <= 1'b1;
              fme_start <= 1'b1;
              state     <= A_PS_WAIT;
            end else begin
              ime_start <= 1'b1;
              state     <= A_IME_WAIT;
            end
          end
        end
        A_PS_WAIT: if (fme_done) begin
          fme_req <= 1'b0;
          if (fme_center_cost < prm.skip_th) begin
            info.skip <= 1'b1;
            for (int k = 0; k < 9; k++) info.imv[k] <= info.mvp;
            skip_hit  <= 1'b1;
            state     <= A_DONE;
          end else begin
            ime_start <= 1'b1;
            state     <= A_IME_WAIT;
          end
        end
        // one search per reference frame; the next one starts from the same points
        A_IME_WAIT: if (ime_done) begin
          if (!ime_ref && prm.n_ref > 2'd1) begin
            for (int k = 0; k < 9; k++) begin
              k_cost[k] <= ime_cost[k]; k_mv[k] <= ime_mv[k]; k_ref[k] <= 1'b0;
            end
            ime_ref   <= 1'b1;
            ime_start <= 1'b1;
          end else state <= A_PMD;
        end
        A_PMD: begin
          for (int k = 0; k < 9; k++) info.imv[k] <= m_mv[k];
          info.iref     <= m_ref;
          info.mode_sel <= sel;
          state <= A_DONE;
        end
        A_DONE: begin
          done  <= 1'b1;
          state <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase
    end
  end
endmodule
