// h264_enc_top: prediction core of a power-aware H.264 encoder.
//
// A three-stage macroblock (MB) pipeline: coarse prediction (pre-skip and
// integer-pel four-step search), fine prediction (one-pass fractional-pel
// refinement and mode decision) and block engine. The processing engines are
// separate from the three stage controllers, so the FME engine serves both
// the pre-skip check of stage 1 and the refinement of stage 2. A system
// controller with the coding-parameter register file issues the pipeline
// ticks; a module-wise clock gate stops the IME engine, the FME engine and
// the parameter register file whenever they are idle.
//
// Host interface: a write/read bus (sys_bus_if, map in enc_pkg) loads the
// search windows, the next MB and the parameters, and starts a run. The block
// engine (intra prediction, reconstruction, entropy coding, deblocking) is
// outside: stage 3 hands it each MB result on be_* and waits for be_done.
// Every finished MB is also shown on out_valid/out_res. The intra enables of
// the parameter set are passed out for the intra predictor.
//
// Data held per stage: stage 1 keeps its MB in the IME engine, stage 2 in
// s2_cur; MB information moves stage to stage at each tick. The MV predictor
// of an MB is the 16x16 (first-partition) MV of the MB two places earlier,
// the latest one finished when the MB enters stage 1, and (0,0) for the
// first two MBs of a run (this design's choice).
// The search-window memory holds two reference frames; the IME reads the one
// stage 1 is searching (ime_ref), the FME the one of the partition stage 2
// refines, and reference 0 for the pre-skip check. The windows are shared by
// all MBs of a run: updating them between MBs is left to the host.
module h264_enc_top
  import enc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // system bus
  input  logic         bus_we,
  input  logic [15:0]  bus_addr,
  input  logic [127:0] bus_wdata,
  output logic [127:0] bus_rdata,
  // block engine (stage 3 processing elements)
  output logic         be_start,
  output mb_res_t      be_res,
  output logic         be_db_en,
  input  logic         be_done,
  output logic         ip_en_intra4,
  output logic         ip_en_intra16,
  // status
  output logic         out_valid,
  output mb_res_t      out_res,
  output logic         busy,
  output logic         frame_done
);
  localparam int GATES = 3;   // 0: IME, 1: FME, 2: parameter RF

  // ---------------- bus and system controller
  logic        rf_we, mb_we, sw_we, sw_ref;
  logic [7:0]  rf_addr;
  logic [31:0] rf_wdata, rf_rdata;
  logic [3:0]  mb_row;
  logic [6:0]  sw_x;
  logic [5:0]  sw_y;
  pix_t        wpix [16];
  param_t      prm;
  logic        go, mb_take;
  logic [2:0]  stage_valid, stage_done;
  logic [15:0] tick;
  logic [GATES-1:0] gate_en, gclk;
  logic [31:0] gate_cnt [GATES];

  sys_bus_if u_bus (.bus_we, .bus_addr, .bus_wdata, .bus_rdata, .rf_we, .rf_addr, .rf_wdata,
                    .rf_rdata, .mb_we, .mb_row, .sw_we, .sw_ref, .sw_x, .sw_y, .wdata_pix(wpix));

  sys_ctl u_sys (.clk, .rf_clk(gclk[2]), .rst_n, .rf_we, .rf_addr, .rf_wdata, .rf_rdata, .prm,
                 .go, .stage_valid, .stage_done, .mb_take, .busy, .frame_done, .tick);

  gated_clock_ctl #(.N(GATES)) u_gck (.clk, .rst_n, .en(gate_en), .gclk, .gate_cnt);

  assign ip_en_intra4  = prm.en_intra4;
  assign ip_en_intra16 = prm.en_intra16;

  // ---------------- MB input buffer and stage-2 MB buffer
  pix_t mb_in  [16][16];
  pix_t s1_cur [16][16];
  pix_t s2_cur [16][16];
  always_ff @(posedge clk) begin
    if (mb_we) mb_in[mb_row] <= wpix;
    if (go) s2_cur <= s1_cur;
  end

  // ---------------- search-window memories
  logic       ime_rd_en, ime_rd_col, fme_rd_en;
  logic [6:0] ime_rd_x, fme_rd_x;
  logic [5:0] ime_rd_y, fme_rd_y;
  pix_t       ime_rd_data [16], fme_rd_data [16];

  logic       ime_ref, f_ref;   // reference frame read by the IME / FME
  swlm_lsda #(.NREF(2)) u_swlm (
    .clk, .wr_en(sw_we), .wr_ref(sw_ref), .wr_x(sw_x), .wr_y(sw_y), .wr_data(wpix),
    .a_en(ime_rd_en), .a_col(ime_rd_col), .a_ref(ime_ref), .a_x(ime_rd_x), .a_y(ime_rd_y),
    .a_data(ime_rd_data),
    .b_en(fme_rd_en), .b_ref(f_ref), .b_x(fme_rd_x), .b_y(fme_rd_y), .b_data(fme_rd_data));

  // ---------------- IME engine (gated clock 0)
  logic      ime_start, ime_busy, ime_done;
  logic [15:0] ime_n_cand;
  imv_t      ime_init [4];
  cost_t     ime_cost [NUM_VBS];
  imv_t      ime_mv   [NUM_VBS];
  mb_info_t  s1_info, s2_info;
  logic [2:0] n_init;

  assign n_init = (prm.n_init == 3'd0) ? 3'd1 : (prm.n_init > 3'd4) ? 3'd4 : prm.n_init;

  ime_engine #(.NINIT(4)) u_ime (
    .clk(gclk[0]), .rst_n, .cur_ld(mb_take), .cur_in(mb_in), .cur_pix(s1_cur),
    .start(ime_start), .init_pt(ime_init), .n_init, .mvp(s1_info.mvp), .lambda(prm.lambda),
    .busy(ime_busy), .done(ime_done), .n_cand(ime_n_cand),
    .rd_en(ime_rd_en), .rd_col(ime_rd_col), .rd_x(ime_rd_x), .rd_y(ime_rd_y),
    .rd_data(ime_rd_data), .best_cost(ime_cost), .best_mv(ime_mv));

  // ---------------- FME engine (gated clock 1), shared by stages 1 and 2
  logic       s1_fme_req, s1_fme_start, s2_fme_start, fme_start, fme_busy, fme_done;
  logic [1:0] s2_px, s2_py, f_px, f_py;
  logic [2:0] s2_pw, s2_ph, f_pw, f_ph;
  imv_t       s2_center, f_center;
  logic       s2_ref;
  qmv_t       s2_mvp_q, f_mvp_q, fme_mv;
  logic [3:0] s2_ref_bits, s2_mode_bits, f_mode_bits;
  logic [21:0] fme_cost, fme_center_cost;
  logic [4:0] fme_best_idx;
  pix_t       f_cur [16][16];

  always_comb begin
    if (s1_fme_req) begin
      f_px = 2'd0; f_py = 2'd0; f_pw = 3'd4; f_ph = 3'd4;
      f_center    = s1_info.mvp;
      f_ref       = 1'b0;          // skip MBs predict from reference 0
      f_mvp_q     = '{x: 10'(int'(s1_info.mvp.x) * 4), y: 10'(int'(s1_info.mvp.y) * 4)};
      f_mode_bits = 4'd1;
      f_cur       = s1_cur;
    end else begin
      f_px = s2_px; f_py = s2_py; f_pw = s2_pw; f_ph = s2_ph;
      f_center    = s2_center;
      f_ref       = s2_ref;
      f_mvp_q     = s2_mvp_q;
      f_mode_bits = s2_mode_bits;
      f_cur       = s2_cur;
    end
  end
  assign fme_start = s1_fme_start | s2_fme_start;

  fme_engine u_fme (
    .clk(gclk[1]), .rst_n, .start(fme_start), .p_x(f_px), .p_y(f_py), .p_w(f_pw), .p_h(f_ph),
    .center(f_center), .mvp(f_mvp_q), .lambda(prm.lambda), .ref_bits(s2_ref_bits),
    .mode_bits(f_mode_bits), .cur(f_cur),
    .rd_en(fme_rd_en), .rd_x(fme_rd_x), .rd_y(fme_rd_y), .rd_data(fme_rd_data),
    .busy(fme_busy), .done(fme_done), .best_mv(fme_mv), .best_cost(fme_cost),
    .best_idx(fme_best_idx), .center_cost(fme_center_cost));

  // ---------------- stage 1: coarse prediction
  imv_t    mvp;
  mb_res_t s2_res;
  logic    skip_hit;
  // the first two MBs of a run have no predecessor: predictor (0,0)
  assign mvp = (tick < 16'd2) ? '{x: 8'sd0, y: 8'sd0}
                              : '{x: 8'(s2_res.mv[0].x >>> 2), y: 8'(s2_res.mv[0].y >>> 2)};

  mbp_s1_ctl u_s1 (
    .clk, .rst_n, .go, .valid(stage_valid[0]), .prm, .mvp,
    .fme_req(s1_fme_req), .fme_start(s1_fme_start), .fme_done, .fme_center_cost,
    .ime_start, .ime_ref, .ime_init, .ime_done, .ime_cost, .ime_mv,
    .info(s1_info), .skip_hit, .done(stage_done[0]));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  s2_info <= '0;
    else if (go) s2_info <= s1_info;

  // ---------------- stage 2: fine prediction
  logic       buf_clr, buf_wr, buf_any;
  pmode_e     buf_mode, best_mode;
  logic [1:0] buf_part;
  qmv_t       best_mv [4];
  logic [23:0] best_cost;

  fme_best_buf u_buf (
    .clk, .rst_n, .clr(buf_clr), .wr_en(buf_wr), .wr_mode(buf_mode), .wr_part(buf_part),
    .wr_mv(fme_mv), .wr_cost(fme_cost), .any_valid(buf_any), .best_mode, .best_mv, .best_cost);

  mbp_s2_ctl u_s2 (
    .clk, .rst_n, .go, .valid(stage_valid[1]), .prm, .info(s2_info),
    .fme_busy_s1(s1_fme_req), .fme_start(s2_fme_start),
    .p_x(s2_px), .p_y(s2_py), .p_w(s2_pw), .p_h(s2_ph), .center(s2_center), .fme_ref(s2_ref), .mvp_q(s2_mvp_q),
    .ref_bits(s2_ref_bits), .mode_bits(s2_mode_bits), .fme_done,
    .buf_clr, .buf_wr, .buf_mode, .buf_part, .best_mode, .best_mv, .best_cost,
    .res(s2_res), .done(stage_done[1]));

  // ---------------- stage 3: block engine
  mbp_s3_ctl u_s3 (
    .clk, .rst_n, .go, .valid(stage_valid[2]), .prm, .res_in(s2_res),
    .be_start, .be_res, .be_db_en, .be_done, .out_valid, .out_res, .done(stage_done[2]));

  // ---------------- clock-gate enables
  assign gate_en[0] = mb_take | ime_start | ime_busy | ime_done;
  assign gate_en[1] = fme_start | fme_busy | fme_done;
  assign gate_en[2] = rf_we;

  // the FME is never started by both stages in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(s1_fme_start && s2_fme_start));
endmodule
