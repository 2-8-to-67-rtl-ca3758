// ime_fss_ctl: search-flow controller of the parallel-VBS four-step search.
//
// Algorithm (four-step search as in the published IME architecture): from an initial point the
// 3x3 pattern with 2-pel spacing is searched; while the best 16x16 candidate
// is not the centre, the pattern is re-centred on it, at most three such
// steps; a final 3x3 pattern with 1-pel spacing around the best ends the
// search. Every candidate updates all 41 best-information registers at once
// (parallel VBS), while the 16x16 result steers the flow. Several initial
// points can be searched one after another (multi-iteration IME); the best
// registers keep the overall best.
//
// Search flow: the systolic array can only move one pixel per cycle, so the
// controller strings the candidates of a step into one path (centre, then
// around the ring) and walks
// between them, first along x, then along y, one single-pel move per cycle.
// Each move reads one row or column from the search-window memory; only
// arrivals at pattern points are evaluated. Starting a new initial point
// reloads the array with 16 row reads. Candidates outside the search range
// [-32,+31] x [-16,+15] are skipped.
//
// Pipeline: a move decided in cycle t reads the memory in t, shifts the array
// at the end of t+1 and its SAD is compared at the end of t+2 (upd, mv and
// mv_cost are issued with that delay). Before deciding the next step the
// controller waits three cycles for the pipeline to drain.
// The centre-then-ring ordering, the x-then-y walk, the 16x16-driven decision and
// the cost lambda*(bits(mvd_x)+bits(mvd_y)) are this design's choices.
module ime_fss_ctl
  import enc_pkg::*;
#(
  parameter int NINIT = 4   // maximum number of initial points per MB
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  imv_t init_pt [NINIT],
  input  logic [$clog2(NINIT+1)-1:0] n_init,  // 1..NINIT
  input  imv_t mvp,             // MV predictor, for the rate term
  input  logic [7:0] lambda,
  input  sad_t sad16,           // 16x16 SAD of the candidate in the array
  // search-window memory read request
  output logic       rd_en,
  output logic       rd_col,
  output logic [6:0] rd_x,
  output logic [5:0] rd_y,
  // systolic array control (aligned with the read data)
  output logic       sra_en,
  output dir_e       sra_dir,
  // best-information update (aligned with the SAD of the candidate)
  output logic       clr,
  output logic       upd,
  output imv_t       upd_mv,
  output cost_t      upd_mv_cost,
  output logic       busy,
  output logic       done,
  output logic [15:0] n_cand          // candidates evaluated in this search
);
  typedef enum logic [2:0] {S_IDLE, S_FILL, S_WALK, S_DRAIN, S_DECIDE} state_e;
  state_e state;
  localparam int ITW = (NINIT > 1) ? $clog2(NINIT) : 1;

  logic signed [7:0] px, py, cx, cy;
  logic [3:0] fill_cnt, idx;
  logic [1:0] step;       // coarse step number 1..3
  logic       fine;       // final 1-pel step
  logic [1:0] drain;
  logic [$clog2(NINIT+1)-1:0] iter;
  cost_t      lbest_cost;
  imv_t       lbest_mv;

  // 3x3 pattern: centre first, then the ring in order, each point one
  // pattern spacing from the previous: (0,0) (-1,0) (-1,-1) (0,-1) (1,-1)
  // (1,0) (1,1) (0,1) (-1,1)
  function automatic logic signed [1:0] off_x(input logic [3:0] i);
    case (i)
      4'd1, 4'd2, 4'd8: return -2'sd1;
      4'd0, 4'd3, 4'd7: return 2'sd0;
      default:          return 2'sd1;
    endcase
  endfunction
  function automatic logic signed [1:0] off_y(input logic [3:0] i);
    case (i)
      4'd2, 4'd3, 4'd4: return -2'sd1;
      4'd0, 4'd1, 4'd5: return 2'sd0;
      default:          return 2'sd1;
    endcase
  endfunction

  function automatic cost_t rate(input logic signed [7:0] x, input logic signed [7:0] y,
                                 input imv_t p, input logic [7:0] lam);
    int b;
    b = se_bits(4 * (int'(x) - int'(p.x))) + se_bits(4 * (int'(y) - int'(p.y)));
    return cost_t'(int'(lam) * b);
  endfunction

  function automatic logic in_range(input int x, input int y);
    return (x >= SR_X_MIN) && (x <= SR_X_MAX) && (y >= SR_Y_MIN) && (y <= SR_Y_MAX);
  endfunction

  // current target
  int tx, ty;
  logic tvalid;
  always_comb begin
    int sp;
    sp = fine ? 1 : 2;
    tx = int'(cx) + sp * int'(off_x(idx));
    ty = int'(cy) + sp * int'(off_y(idx));
    tvalid = in_range(tx, ty);
  end

  // issue stage (stage 0) signals
  logic s0_move, s0_upd;
  dir_e s0_dir;
  logic signed [7:0] nx, ny;
  always_comb begin
    s0_move = 1'b0;
    s0_upd  = 1'b0;
    s0_dir  = MV_DOWN;
    nx = px;
    ny = py;
    rd_en  = 1'b0;
    rd_col = 1'b0;
    rd_x   = 7'(int'(px) - SR_X_MIN);
    rd_y   = 6'(int'(py) - SR_Y_MIN);
    if (state == S_FILL) begin
      s0_move = 1'b1;
      s0_dir  = MV_DOWN;
      rd_en   = 1'b1;
      rd_y    = 6'(int'(py) - SR_Y_MIN + int'(fill_cnt));
      s0_upd  = (fill_cnt == 4'd15) && tvalid && (tx == int'(px)) && (ty == int'(py));
    end else if (state == S_WALK && idx != 4'd9 && tvalid) begin
      if (int'(px) != tx) begin
        s0_move = 1'b1;
        s0_dir  = (int'(px) < tx) ? MV_RIGHT : MV_LEFT;
        nx      = (int'(px) < tx) ? px + 8'sd1 : px - 8'sd1;
      end else if (int'(py) != ty) begin
        s0_move = 1'b1;
        s0_dir  = (int'(py) < ty) ? MV_DOWN : MV_UP;
        ny      = (int'(py) < ty) ? py + 8'sd1 : py - 8'sd1;
      end
      s0_upd = (int'(nx) == tx) && (int'(ny) == ty);
      rd_en  = s0_move;
      rd_col = (s0_dir == MV_LEFT) || (s0_dir == MV_RIGHT);
      rd_x   = 7'(int'(nx) - SR_X_MIN + ((s0_dir == MV_RIGHT) ? 15 : 0));
      rd_y   = 6'(int'(ny) - SR_Y_MIN + ((s0_dir == MV_DOWN) ? 15 : 0));
    end
  end

  // pipeline of the issued moves
  logic s1_move, s1_upd, s2_upd;
  dir_e s1_dir;
  imv_t s1_mv, s2_mv;
  assign sra_en  = s1_move;
  assign sra_dir = s1_dir;
  assign upd     = s2_upd;
  assign upd_mv  = s2_mv;
  assign upd_mv_cost = rate(s2_mv.x, s2_mv.y, mvp, lambda);
  assign busy    = (state != S_IDLE);

  // next initial point, clamped into the search range
  logic signed [7:0] ix, iy;
  always_comb begin
    ix = init_pt[ITW'(iter)].x;
    iy = init_pt[ITW'(iter)].y;
    if (ix < 8'(SR_X_MIN)) ix = 8'(SR_X_MIN);
    if (ix > 8'(SR_X_MAX)) ix = 8'(SR_X_MAX);
    if (iy < 8'(SR_Y_MIN)) iy = 8'(SR_Y_MIN);
    if (iy > 8'(SR_Y_MAX)) iy = 8'(SR_Y_MAX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      px <= '0; py <= '0; cx <= '0; cy <= '0;
      fill_cnt <= '0; idx <= '0; step <= 2'd1; fine <= 1'b0; drain <= '0; iter <= '0;
      lbest_cost <= '1; lbest_mv <= '0;
      s1_move <= 1'b0; s1_upd <= 1'b0; s2_upd <= 1'b0;
      s1_dir <= MV_DOWN; s1_mv <= '0; s2_mv <= '0;
      clr <= 1'b0; done <= 1'b0; n_cand <= '0;
    end else begin
      clr  <= 1'b0;
      done <= 1'b0;
      s1_move <= s0_move;
      s1_dir  <= s0_dir;
      s1_upd  <= s0_upd;
      s1_mv   <= '{x: nx, y: ny};
      s2_upd  <= s1_upd;
      s2_mv   <= s1_mv;
      if (s2_upd) begin
        n_cand <= n_cand + 16'd1;
        if (cost_t'(sad16) + upd_mv_cost < lbest_cost) begin
          lbest_cost <= cost_t'(sad16) + upd_mv_cost;
          lbest_mv   <= s2_mv;
        end
      end
      unique case (state)
        S_IDLE: if (start) begin
          clr   <= 1'b1;
          iter  <= '0;
          n_cand <= '0;
          state <= S_DECIDE;
          fine  <= 1'b1;                // enters the next initial point
          idx   <= 4'd9;
        end
        S_FILL: begin
          fill_cnt <= fill_cnt + 4'd1;
          if (fill_cnt == 4'd15) begin
            state <= S_WALK;
            // the first pattern point was the fill position itself
            idx <= (tvalid && tx == int'(px) && ty == int'(py)) ? idx + 4'd1 : idx;
          end
        end
        S_WALK: begin
          if (idx == 4'd9) begin
            state <= S_DRAIN;
            drain <= '0;
          end else if (!tvalid) begin
            idx <= idx + 4'd1;
          end else begin
            px <= nx;
            py <= ny;
            if (s0_upd) idx <= idx + 4'd1;
          end
        end
        S_DRAIN: begin
          drain <= drain + 2'd1;
          if (drain == 2'd2) state <= S_DECIDE;
        end
        S_DECIDE: begin
          if (!fine && !(lbest_mv.x == cx && lbest_mv.y == cy) && step != 2'd3) begin
            step  <= step + 2'd1;             // next coarse step
            cx    <= lbest_mv.x;
            cy    <= lbest_mv.y;
            idx   <= '0;
            state <= S_WALK;
          end else if (!fine) begin
            fine  <= 1'b1;                    // final 1-pel step
            cx    <= lbest_mv.x;
            cy    <= lbest_mv.y;
            idx   <= '0;
            state <= S_WALK;
          end else if (iter != n_init) begin
            // next initial point: reload the array at the first pattern point
            iter  <= iter + 1'b1;
            cx    <= ix;
            cy    <= iy;
            px    <= ix;
            py    <= iy;
            step  <= 2'd1;
            fine  <= 1'b0;
            idx   <= 4'd0;                    // centre is where the array is loaded
            fill_cnt <= '0;
            lbest_cost <= '1;
            state <= S_FILL;
          end else begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
