// enc_pkg: types, sizes and small functions shared by the encoder blocks.
// Search range [-32,+31] x [-16,+15] and two reference frames follow the chip
// feature table; the 41 variable-block-size (VBS) blocks and the 25 half/quarter
// candidates follow the IME and FME descriptions. Widths and encodings of the
// motion vectors, costs and block indices are this design's own choices.
package enc_pkg;
  // Search range (chip feature table)
  localparam int SR_X_MIN = -32;
  localparam int SR_X_MAX = 31;
  localparam int SR_Y_MIN = -16;
  localparam int SR_Y_MAX = 15;
  // Search window = 16x16 block plus range, rounded up to whole 16-pixel groups
  localparam int SW_W = 80;   // 79 pixels used
  localparam int SW_H = 48;   // 47 rows used
  localparam int NUM_VBS = 41; // 1 16x16, 2 16x8, 2 8x16, 4 8x8, 8 8x4, 8 4x8, 16 4x4
  localparam int SAD_W = 16;
  localparam int COST_W = 18;

  typedef logic [7:0] pix_t;
  typedef logic [SAD_W-1:0] sad_t;
  typedef logic [COST_W-1:0] cost_t;

  // Integer-pel motion vector
  typedef struct packed {
    logic signed [7:0] x;
    logic signed [7:0] y;
  } imv_t;

  // Quarter-pel motion vector
  typedef struct packed {
    logic signed [9:0] x;
    logic signed [9:0] y;
  } qmv_t;

  // Shift configuration of the systolic register array, named by the
  // direction in which the candidate position moves.
  typedef enum logic [1:0] {MV_UP = 2'd0, MV_DOWN = 2'd1, MV_LEFT = 2'd2, MV_RIGHT = 2'd3} dir_e;

  // Partition modes for the pre-mode and Lagrangian decisions
  typedef enum logic [2:0] {PM_16x16 = 3'd0, PM_16x8 = 3'd1, PM_8x16 = 3'd2, PM_8x8 = 3'd3,
                            PM_SKIP = 3'd4} pmode_e;

  // Coding parameters for power scalability (published power-aware flow),
  // held in the coding-parameter register file of the system controller.
  typedef struct packed {
    logic [15:0] num_mb;      // MBs to encode in this run
    logic [21:0] skip_th;     // pre-skip threshold (TH)
    logic [2:0]  n_init;      // iteration number of initial points, 1..4
    logic [1:0]  n_ref;       // reference frame number, 1..2
    logic [2:0]  n_vbs;       // iteration number of selected block modes, 1..4
    logic [7:0]  lambda;      // Lagrange multiplier
    logic        en_preskip;
    logic        en_intra4;
    logic        en_intra16;
    logic        en_db;       // enable deblocking filter
  } param_t;

  // Coding-parameter register addresses on the system bus
  localparam logic [7:0] RA_CTRL   = 8'h00;  // write bit 0 = start
  localparam logic [7:0] RA_NUMMB  = 8'h01;
  localparam logic [7:0] RA_TH     = 8'h02;
  localparam logic [7:0] RA_NINIT  = 8'h03;
  localparam logic [7:0] RA_NREF   = 8'h04;
  localparam logic [7:0] RA_NVBS   = 8'h05;
  localparam logic [7:0] RA_LAMBDA = 8'h06;
  localparam logic [7:0] RA_ENABLE = 8'h07;  // bit0 preskip, 1 intra4, 2 intra16, 3 db
  localparam logic [7:0] RA_MBRDY  = 8'h08;  // write: next MB is in the input buffer
  localparam logic [7:0] RA_STATUS = 8'h09;  // read: {busy, ticks}

  // System bus address map (16-bit word addresses, 128-bit data = 16 pixels)
  //   0x00nn         coding-parameter register nn
  //   0x10rr         row rr of the current-MB input buffer
  //   0x4000 | ref<<10 | y<<3 | g   search window, pixels 16g..16g+15 of row y

  // MB coding information passed from coarse to fine prediction
  typedef struct packed {
    logic        skip;         // pre-skip hit: IME and FME were skipped
    logic [3:0]  mode_sel;     // modes chosen by the pre-mode decision (bit = pmode_e)
    imv_t [8:0]  imv;          // IME best MV of VBS blocks 0..8 (16x16, 16x8, 8x16, 8x8)
    logic [8:0]  iref;         // reference frame of each of those MVs
    imv_t        mvp;          // MV predictor (integer pel)
  } mb_info_t;

  // MB result passed from fine prediction to the block engine
  typedef struct packed {
    pmode_e      mode;         // PM_SKIP or a partition mode
    qmv_t [3:0]  mv;           // per partition, quarter pel
    logic [3:0]  ref_idx;      // per partition, reference frame
    logic [23:0] cost;
  } mb_res_t;

  // VBS index layout: 0: 16x16; 1-2: 16x8 (top, bottom); 3-4: 8x16 (left, right);
  // 5-8: 8x8 (raster); 9-16: 8x4 (8x8 block k -> 9+2k, 10+2k, top then bottom);
  // 17-24: 4x8 (8x8 block k -> 17+2k, 18+2k, left then right);
  // 25-40: 4x4 in raster order over the MB.
  function automatic int vbs_first(input pmode_e m);
    case (m)
      PM_16x8: return 1;
      PM_8x16: return 3;
      PM_8x8:  return 5;
      default: return 0;
    endcase
  endfunction

  function automatic int vbs_count(input pmode_e m);
    case (m)
      PM_16x8, PM_8x16: return 2;
      PM_8x8:  return 4;
      default: return 1;
    endcase
  endfunction

  // Number of bits of the signed Exp-Golomb code of v (H.264 se(v)).
  function automatic int se_bits(input int v);
    int k, n;
    k = (v > 0) ? 2*v - 1 : -2*v;
    n = 0;
    for (int b = 1; b < 31; b++)
      if (((k + 1) >> b) != 0) n = b;
    return 2*n + 1;
  endfunction
endpackage
