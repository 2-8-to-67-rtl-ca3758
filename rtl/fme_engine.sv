// fme_engine: one-pass fractional-pel motion estimation engine.
//
// Refines one partition (a rectangle of 4x4 blocks of the MB) around its best
// integer MV. All 25 half/quarter candidates are searched in one pass rather
// than half-pel first and quarter-pel after: for each 4x4 block the engine
// reads ten rows of ten reference pixels from the search-window memory, the
// interpolation engine makes the nine half-pel predictions, nine half PUs form
// their Hadamard-transformed residues and SATDs, the bilinear array derives
// the sixteen quarter-pel transformed residues from them and sixteen quarter
// PUs accumulate those. After the last block the RD decision picks the best
// of the 25 candidates. This dataflow is the one of the published FME architecture.
//
// Interface: start with the partition (p_x, p_y, p_w, p_h in 4x4 units), the
// integer centre MV, the MV predictor (quarter pel), lambda and the rate bits
// of reference and mode. The original pixels come from cur (the MB held by the
// stage). done pulses when best_* and center_cost are valid; they stay valid
// until the next start. A new start is accepted in the done cycle too.
// Timing: 12 cycles per 4x4 block (10 reads, 1 for the last row to arrive,
// 1 accumulate); done comes 12*blocks + 1 cycles after start.
// Reads outside the stored window are clamped to its edge (this design's
// choice; the rows and columns beyond the search range are not stored).
module fme_engine
  import enc_pkg::*;
#(
  parameter int W = SW_W,
  parameter int H = SW_H
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic [1:0] p_x,
  input  logic [1:0] p_y,
  input  logic [2:0] p_w,
  input  logic [2:0] p_h,
  input  imv_t center,
  input  qmv_t mvp,
  input  logic [7:0] lambda,
  input  logic [3:0] ref_bits,
  input  logic [3:0] mode_bits,
  input  pix_t cur [16][16],
  // search-window memory port
  output logic rd_en,
  output logic [$clog2(W)-1:0] rd_x,
  output logic [$clog2(H)-1:0] rd_y,
  input  pix_t rd_data [16],
  // result
  output logic busy,
  output logic done,
  output qmv_t best_mv,
  output logic [21:0] best_cost,
  output logic [4:0]  best_idx,      // winning candidate, numbered as in fme_rdo_md
  output logic [21:0] center_cost
);
  typedef enum logic [1:0] {F_IDLE, F_READ, F_ACC, F_DONE} fstate_e;
  fstate_e state;

  logic [1:0] px0, py0;
  logic [2:0] pw;
  logic [3:0] blk, nblk;
  logic [3:0] rr;            // row being requested
  logic       cap;           // a row arrives this cycle
  logic [3:0] cap_row;
  int         cap_off;       // column offset of the window inside the read row
  int         off_q;
  imv_t       ctr;
  pix_t       win [10][10];
  pix_t       orig [4][4];
  pix_t       pred [9][4][4];
  logic signed [12:0] hcoef [9][4][4];
  logic signed [12:0] qcoef [16][4][4];
  logic [19:0] distortion [25];
  logic        clr_pu, acc_pu;

  int bx, by, wx, wy, xs;
  always_comb begin
    bx = int'(px0) + int'(blk) % int'(pw);
    by = int'(py0) + int'(blk) / int'(pw);
    wx = bx * 4 + int'(ctr.x) - SR_X_MIN - 3;
    wy = by * 4 + int'(ctr.y) - SR_Y_MIN - 3 + int'(rr);
    xs = (wx < 0) ? 0 : (wx > W - 16) ? W - 16 : wx;
    if (wy < 0) wy = 0;
    if (wy > H - 1) wy = H - 1;
    rd_en = (state == F_READ) && (rr < 4'd10);
    rd_x  = ($clog2(W))'(xs);
    rd_y  = ($clog2(H))'(wy);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        orig[r][c] = cur[by * 4 + r][bx * 4 + c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= F_IDLE;
      blk <= '0; rr <= '0; cap <= 1'b0; cap_row <= '0; off_q <= 0;
      px0 <= '0; py0 <= '0; pw <= 3'd1; nblk <= 4'd0; ctr <= '0;
    end else begin
      cap <= rd_en;
      cap_row <= rr;
      off_q <= wx - xs;
      unique case (state)
        F_IDLE, F_DONE: if (start) begin
          px0 <= p_x; py0 <= p_y; pw <= p_w; ctr <= center;
          nblk <= 4'(int'(p_w) * int'(p_h) - 1);
          blk <= '0; rr <= '0;
          state <= F_READ;
        end else begin
          state <= F_IDLE;
        end
        F_READ: begin
          if (rr != 4'd10) rr <= rr + 4'd1;
          else state <= F_ACC;               // last row is captured now
        end
        F_ACC: begin
          rr <= '0;
          if (blk == nblk) state <= F_DONE;
          else begin
            blk <= blk + 4'd1;
            state <= F_READ;
          end
        end
        default: state <= F_IDLE;
      endcase
    end
  end

  // window capture, with clamping of the columns to the stored window
  assign cap_off = off_q;
  always_ff @(posedge clk)
    if (cap)
      for (int c = 0; c < 10; c++) begin
        int k;
        k = cap_off + c;
        if (k < 0) k = 0;
        if (k > 15) k = 15;
        win[cap_row][c] <= rd_data[4'(k)];
      end

  assign clr_pu = (state == F_IDLE || state == F_DONE) && start;
  assign acc_pu = (state == F_ACC);
  assign busy   = (state != F_IDLE);
  assign done   = (state == F_DONE);

  fme_interp u_interp (.win, .pred);

  for (genvar h = 0; h < 9; h++) begin : g_half
    fme_half_pu u_hpu (.clk, .clr(clr_pu), .acc(acc_pu), .orig, .pred(pred[h]),
                       .coef(hcoef[h]), .satd(distortion[h]));
  end

  fme_qbilinear u_bil (.hcoef, .qcoef);

  for (genvar q = 0; q < 16; q++) begin : g_quarter
    fme_quarter_pu u_qpu (.clk, .clr(clr_pu), .acc(acc_pu), .coef(qcoef[q]),
                          .satd(distortion[9 + q]));
  end

  qmv_t center_q;
  assign center_q = '{x: 10'(int'(ctr.x) * 4), y: 10'(int'(ctr.y) * 4)};

  fme_rdo_md u_rdo (.distortion, .center(center_q), .mvp, .lambda, .ref_bits, .mode_bits,
                    .best_mv, .best_cost, .best_idx(best_idx), .center_cost);
endmodule
