// ime_engine: integer-pel motion estimation engine.
//
// Chains the blocks of the published IME architecture: the search-window memory (outside, on
// the rd_*/rd_data port) feeds one row or column of 16 reference pixels per
// cycle into the four-configuration systolic array; the 16x16 PE array
// compares the array with the current MB; sixteen 4x4 sub-adder trees and the
// variable-block-size tree give the 41 SADs of the candidate; the best-info
// registers keep the best cost and motion vector of each block. The FSS
// controller drives the flow. One candidate position is reached per cycle
// of movement; see ime_fss_ctl for the pipeline.
// The current MB is loaded in one cycle (cur_ld) when the MB pipeline
// advances and held in a register; cur_pix exports it for the next stage.
module ime_engine
  import enc_pkg::*;
#(
  parameter int NINIT = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // current MB load
  input  logic  cur_ld,
  input  pix_t  cur_in [16][16],
  output pix_t  cur_pix [16][16],
  // search control
  input  logic  start,
  input  imv_t  init_pt [NINIT],
  input  logic [$clog2(NINIT+1)-1:0] n_init,
  input  imv_t  mvp,
  input  logic [7:0] lambda,
  output logic  busy,
  output logic  done,
  output logic [15:0] n_cand,
  // search-window memory port
  output logic  rd_en,
  output logic  rd_col,
  output logic [6:0] rd_x,
  output logic [5:0] rd_y,
  input  pix_t  rd_data [16],
  // results
  output cost_t best_cost [NUM_VBS],
  output imv_t  best_mv   [NUM_VBS]
);
  pix_t cur [16][16];
  pix_t ref_blk [16][16];
  logic [7:0]  ad [16][16];
  logic [7:0]  ad4 [16][16];   // regrouped per 4x4 block
  logic [11:0] sad4 [16];
  sad_t        sad [NUM_VBS];
  logic  sra_en, clr, upd;
  dir_e  sra_dir;
  imv_t  upd_mv;
  cost_t upd_mv_cost;

  always_ff @(posedge clk)
    if (cur_ld) cur <= cur_in;
  assign cur_pix = cur;

  ime_sra u_sra (.clk, .en(sra_en), .dir(sra_dir), .in(rd_data), .ref_blk);
  ime_pe_array u_pe (.cur, .ref_blk, .ad);

  always_comb
    for (int b = 0; b < 16; b++)
      for (int i = 0; i < 16; i++)
        ad4[b][i] = ad[(b / 4) * 4 + i / 4][(b % 4) * 4 + i % 4];

  for (genvar b = 0; b < 16; b++) begin : g_sub
    ime_sub_tree u_sub (.ad(ad4[b]), .sad(sad4[b]));
  end

  ime_vbs_tree u_vbs (.sad4, .sad);

  ime_best_info u_best (.clk, .rst_n, .clr, .upd, .sad, .mv_cost(upd_mv_cost), .mv(upd_mv),
                        .best_cost, .best_mv);

  ime_fss_ctl #(.NINIT(NINIT)) u_ctl (
    .clk, .rst_n, .start, .init_pt, .n_init, .mvp, .lambda, .sad16(sad[0]),
    .rd_en, .rd_col, .rd_x, .rd_y, .sra_en, .sra_dir, .clr, .upd, .upd_mv, .upd_mv_cost,
    .busy, .done, .n_cand);
endmodule
