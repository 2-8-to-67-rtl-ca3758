// tb_h264_enc_top: end-to-end run of the encoder prediction core.
//
// A host model loads a textured search window and the coding parameters over
// the system bus, then feeds MBs (blocks of the window at chosen motions,
// plus noise), announcing each with RA_MBRDY and sometimes late so that the
// pipeline waits for the host. A block-engine model answers stage 3 after a
// random latency. Every MB result is compared with a reference chain written
// here: pre-skip cost at the MV predictor, four-step search with plain SADs,
// pre-mode ranking, 25-candidate fractional search per partition and the
// Lagrangian choice of mode. Two runs use different power-scalability
// settings. Mechanisms counted (each must occur): pre-skip hits and misses,
// the FME lent to stage 1 while stage 2 waits for it, a full three-MB
// pipeline, pipeline waits for the host, clock gating of each domain,
// several IME initial points, several refined modes, quarter-pel winners,
// a mode other than 16x16, the second reference frame winning. The longest MB tick, with four initial points and
// all four modes refined, must fit the SDTV budget of 1333 cycles per MB at
// 54 MHz.
module tb_h264_enc_top;
  import enc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic bus_we = 0;
  logic [15:0] bus_addr = 0;
  logic [127:0] bus_wdata = 0, bus_rdata;
  logic be_start, be_db_en, be_done = 0, ip_en_intra4, ip_en_intra16;
  mb_res_t be_res, out_res;
  logic out_valid, busy, frame_done;

  h264_enc_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  task automatic bus_wr(input logic [15:0] a, input logic [127:0] d);
    @(negedge clk);
    bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_we = 0;
  endtask

  // ---------------- block-engine model
  int be_busy_cycles;
  always @(posedge clk) begin
    if (be_start) fork begin
      repeat ($urandom_range(5, 60)) @(posedge clk);
      be_done <= 1; @(posedge clk); be_done <= 0;
    end join_none
  end

  // ---------------- mechanism counters
  int n_skip_hit, n_skip_miss, n_fme_lent, n_full_pipe, n_host_wait, n_multi_init, n_multi_mode,
      n_quarter, n_small_mode, n_ref1;
  always @(posedge clk) begin
    if (dut.skip_hit) n_skip_hit++;
    if (dut.ime_start) n_skip_miss++;
    if (dut.u_s2.state == dut.u_s2.B_GRANT && dut.s1_fme_req) n_fme_lent++;
    if (dut.go && dut.stage_valid == 3'b111) n_full_pipe++;
    if (dut.u_sys.state == dut.u_sys.C_WAITMB && !dut.u_sys.mb_ready &&
        int'(dut.u_sys.tick) < int'(dut.prm.num_mb)) n_host_wait++;
    if (dut.ime_start && dut.n_init > 1) n_multi_init++;
    if (dut.u_s2.state == dut.u_s2.B_DECIDE && $countones(dut.s2_info.mode_sel) > 1) n_multi_mode++;
    if (dut.fme_done && dut.fme_best_idx >= 9) n_quarter++;
    if (out_valid && out_res.mode != PM_16x16 && out_res.mode != PM_SKIP) n_small_mode++;
  end

  // ---------------- pipeline tick length (host waits excluded)
  int tick_cyc = 0, tick_max = 0;
  always @(posedge clk) begin
    if (dut.go) tick_cyc = 0;
    else if (dut.u_sys.state == dut.u_sys.C_RUN) begin
      tick_cyc++;
      if (tick_cyc > tick_max) tick_max = tick_cyc;
    end
  end

  // ---------------- reference chain
  sw_t sw0, sw1;     // search windows of references 0 and 1
  mb_t mbs [16];
  mb_res_t expv [16];

  function automatic void ref_mb(input int n, input param_t p, input int mvpx, input int mvpy,
                                 output mb_res_t r);
    int d [25], lam, refb, cc;
    int ix [4], iy [4], bc [41], bmx [41], bmy [41], nc, br [9], pref [4][4];
    int mc [4], rank [4], np [4], gx [4][4], gy [4][4], gw [4], gh [4], mb [4];
    int best_m, best_tot;
    qmv_t pmv [4][4];
    lam = int'(p.lambda);
    refb = (p.n_ref > 1) ? 1 : 0;
    np = '{1, 2, 2, 4}; mb = '{1, 3, 3, 7}; gw = '{16, 16, 8, 8}; gh = '{16, 8, 16, 8};
    gx = '{'{0, 0, 0, 0}, '{0, 0, 0, 0}, '{0, 8, 0, 0}, '{0, 8, 0, 8}};
    gy = '{'{0, 0, 0, 0}, '{0, 8, 0, 0}, '{0, 0, 0, 0}, '{0, 0, 8, 8}};
    r = '0;
    if (p.en_preskip) begin
      fme_ref(sw0, mbs[n], mvpx, mvpy, 0, 0, 16, 16, d);
      cc = d[4] + lam * (1 + 1 + refb + 1);    // se(0) twice, ref, mode 16x16
      if (cc < int'(p.skip_th)) begin
        r.mode = PM_SKIP;
        for (int k = 0; k < 4; k++) r.mv[k] = '{x: 10'(4 * mvpx), y: 10'(4 * mvpy)};
        r.cost = '0;
        return;
      end
    end
    ix = '{mvpx, 0, -16, 16}; iy = '{mvpy, 0, 0, 0};
    fss_ref(sw0, mbs[n], ix, iy, int'(p.n_init), mvpx, mvpy, lam, bc, bmx, bmy, nc);
    br = '{default: 0};
    if (p.n_ref > 1) begin
      int bc1 [41], bmx1 [41], bmy1 [41];
      fss_ref(sw1, mbs[n], ix, iy, int'(p.n_init), mvpx, mvpy, lam, bc1, bmx1, bmy1, nc);
      for (int k = 0; k < 9; k++)
        if (bc1[k] < bc[k]) begin bc[k] = bc1[k]; bmx[k] = bmx1[k]; bmy[k] = bmy1[k]; br[k] = 1; end
    end
    mc[0] = bc[0]; mc[1] = bc[1] + bc[2]; mc[2] = bc[3] + bc[4]; mc[3] = bc[5] + bc[6] + bc[7] + bc[8];
    best_m = -1; best_tot = 0;
    for (int m = 0; m < 4; m++) begin
      int tot;
      rank[m] = 0;
      for (int k = 0; k < 4; k++) if (mc[k] < mc[m] || (mc[k] == mc[m] && k < m)) rank[m]++;
      if (rank[m] >= int'(p.n_vbs)) continue;
      tot = 0;
      for (int q = 0; q < np[m]; q++) begin
        int cx, cy, bcost, bi, vb;
        vb = (m == 0) ? 0 : (m == 1) ? 1 + q : (m == 2) ? 3 + q : 5 + q;
        cx = bmx[vb]; cy = bmy[vb];
        pref[m][q] = br[vb];
        if (br[vb]) fme_ref(sw1, mbs[n], cx, cy, gx[m][q], gy[m][q], gw[m], gh[m], d);
        else        fme_ref(sw0, mbs[n], cx, cy, gx[m][q], gy[m][q], gw[m], gh[m], d);
        bcost = 1 << 30; bi = 0;
        for (int i = 0; i < 25; i++) begin
          int dx, dy, c;
          cand_off(i, dx, dy);
          c = d[i] + lam * (eg_len(4 * cx + dx - 4 * mvpx) + eg_len(4 * cy + dy - 4 * mvpy) + refb
                            + (q == 0 ? mb[m] : 0));
          if (c < bcost) begin bcost = c; bi = i; end
        end
        begin
          int dx, dy;
          cand_off(bi, dx, dy);
          pmv[m][q] = '{x: 10'(4 * cx + dx), y: 10'(4 * cy + dy)};
        end
        tot += bcost;
      end
      if (best_m < 0 || tot < best_tot) begin best_m = m; best_tot = tot; end
    end
    r.mode = pmode_e'(best_m);
    for (int q = 0; q < 4; q++) begin
      r.mv[q]      = (q < np[best_m]) ? pmv[best_m][q] : '0;
      r.ref_idx[q] = (q < np[best_m]) ? 1'(pref[best_m][q]) : 1'b0;
    end
    r.cost = 24'(best_tot);
  endfunction

  task automatic run(input int n_mb, input param_t p, input int mx [16], input int my [16],
                     input int mr [16], input int noise);
    int got, ncyc;
    mb_res_t res_hist [16];
    // parameters
    bus_wr(16'(RA_NUMMB), 128'(n_mb));
    bus_wr(16'(RA_TH), 128'(p.skip_th));
    bus_wr(16'(RA_NINIT), 128'(p.n_init));
    bus_wr(16'(RA_NREF), 128'(p.n_ref));
    bus_wr(16'(RA_NVBS), 128'(p.n_vbs));
    bus_wr(16'(RA_LAMBDA), 128'(p.lambda));
    bus_wr(16'(RA_ENABLE), 128'({p.en_db, p.en_intra16, p.en_intra4, p.en_preskip}));
    chk(ip_en_intra4 == p.en_intra4 && ip_en_intra16 == p.en_intra16, "intra enables out");
    @(negedge clk);
    bus_addr = 16'(RA_LAMBDA);
    #1 chk(bus_rdata[7:0] == p.lambda, "parameter read-back");
    // current MBs
    for (int n = 0; n < n_mb; n++)
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++)
          mbs[n][y][x] = 8'(clip255(int'(mr[n] ? sw1[y + my[n] + 16][x + mx[n] + 32]
                                                : sw0[y + my[n] + 16][x + mx[n] + 32]) +
                                    (noise ? $urandom_range(0, 2 * noise) - noise : 0)));
    bus_wr(16'(RA_CTRL), 128'd1);
    got = 0; ncyc = 0;
    fork
      begin : host
        for (int n = 0; n < n_mb; n++) begin
          if (n % 3 == 2) repeat ($urandom_range(100, 400)) @(negedge clk);   // a late host
          for (int y = 0; y < 16; y++) begin
            logic [127:0] d;
            for (int x = 0; x < 16; x++) d[8*x +: 8] = mbs[n][y][x];
            bus_wr(16'h1000 | 16'(y), d);
          end
          bus_wr(16'(RA_MBRDY), 128'd1);
          // wait until stage 1 has taken it before overwriting the buffer
          @(posedge clk iff dut.mb_take);
        end
      end
      begin : sink
        while (got < n_mb) begin
          @(posedge clk);
          if (out_valid) begin
            int pvx, pvy;
            mb_res_t e;
            // MV predictor: first-partition MV of the MB two places earlier
            pvx = (got >= 2) ? int'(res_hist[got - 2].mv[0].x) >>> 2 : 0;
            pvy = (got >= 2) ? int'(res_hist[got - 2].mv[0].y) >>> 2 : 0;
            ref_mb(got, p, pvx, pvy, e);
            chk(out_res.mode == e.mode, $sformatf("MB %0d mode %0d exp %0d", got, out_res.mode, e.mode));
            for (int q = 0; q < vbs_count(e.mode); q++)
              chk(out_res.mv[q] == e.mv[q] && out_res.ref_idx[q] == e.ref_idx[q], $sformatf("MB %0d part %0d MV (%0d,%0d) exp (%0d,%0d)", got, q,
                  int'(out_res.mv[q].x), int'(out_res.mv[q].y), int'(e.mv[q].x), int'(e.mv[q].y)));
            chk(out_res.cost == e.cost, $sformatf("MB %0d cost %0d exp %0d", got, out_res.cost, e.cost));
            $display("MB %0d: mode %0d mv0 (%0d,%0d)/4 ref %0d, true (%0d,%0d) ref %0d", got, out_res.mode,
                     int'(out_res.mv[0].x), int'(out_res.mv[0].y), out_res.ref_idx[0], mx[got], my[got], mr[got]);
            if (out_res.ref_idx != '0) n_ref1++;
            res_hist[got] = out_res;
            got++;
          end
        end
      end
      begin : timer
        while (!frame_done) begin @(posedge clk); ncyc++; end
      end
    join
    chk(be_db_en == p.en_db, "deblocking enable passed on");
    $display("run of %0d MBs: %0d cycles", n_mb, ncyc);
  endtask

  initial begin
    param_t p;
    int mx [16], my [16], mr [16];
    n_ref1 = 0;
    n_skip_hit = 0; n_skip_miss = 0; n_fme_lent = 0; n_full_pipe = 0; n_host_wait = 0;
    n_multi_init = 0; n_multi_mode = 0; n_quarter = 0; n_small_mode = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // search window, reference 0: smooth texture with detail
    for (int y = 0; y < SW_H; y++)
      for (int x = 0; x < SW_W; x++) begin
        sw0[y][x] = 8'(128 + 60 * $sin(0.13 * x) * $cos(0.17 * y) + 25 * $sin(0.29 * x + 0.21 * y)
                       + $urandom_range(0, 4));
        sw1[y][x] = 8'(120 + 50 * $cos(0.11 * x + 0.5) * $sin(0.19 * y + 0.3) + 30 * $cos(0.23 * x - 0.17 * y)
                       + $urandom_range(0, 4));
      end
    for (int r = 0; r < 2; r++)
      for (int y = 0; y < SW_H; y++)
        for (int g = 0; g < SW_W / 16; g++) begin
          logic [127:0] d;
          for (int i = 0; i < 16; i++) d[8*i +: 8] = r ? sw1[y][16 * g + i] : sw0[y][16 * g + i];
          bus_wr(16'h4000 | 16'(r << 10) | 16'(y << 3) | 16'(g), d);
        end
    // run 1: pre-skip on, two initial points, two refined modes
    p = '0;
    p.skip_th = 22'd700; p.n_init = 3'd2; p.n_ref = 2'd1; p.n_vbs = 3'd2; p.lambda = 8'd4;
    p.en_preskip = 1; p.en_db = 1; p.en_intra4 = 1;
    mx = '{0, 0, 6, -9, 6, 12, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    my = '{0, 0, 3, -4, 3, -6, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    mr = '{default: 0};
    run(6, p, mx, my, mr, 1);
    // run 2: pre-skip off, four initial points, all four modes, two references
    p.en_preskip = 0; p.n_init = 3'd4; p.n_vbs = 3'd4; p.n_ref = 2'd2; p.lambda = 8'd2; p.en_db = 0;
    p.en_intra4 = 0; p.en_intra16 = 1;
    mx = '{-20, 25, 3, -7, 14, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    my = '{9, -12, -2, 5, 10, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    mr = '{0, 1, 1, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    run(5, p, mx, my, mr, 3);
    // rate: SDTV (1350 MBs) at 30 frames/s on 54 MHz leaves 1333 cycles per MB
    chk(tick_max <= 1333, $sformatf("longest tick %0d cycles > 1333", tick_max));
    $display("longest pipeline tick: %0d cycles (SDTV budget at 54 MHz: 1333)", tick_max);
    // mechanisms
    chk(n_skip_hit > 0, "pre-skip hit");
    chk(n_skip_miss > 0, "pre-skip miss / IME run");
    chk(n_fme_lent > 0, "FME lent to stage 1 while stage 2 waits");
    chk(n_full_pipe > 0, "three MBs in the pipeline");
    chk(n_host_wait > 0, "pipeline waits for the host");
    for (int i = 0; i < 3; i++) chk(dut.gate_cnt[i] > 0, $sformatf("clock gate %0d suppressed edges", i));
    chk(n_multi_init > 0, "multi-iteration IME");
    chk(n_multi_mode > 0, "several modes refined");
    chk(n_quarter > 0, "quarter-pel winner");
    chk(n_small_mode > 0, "partition smaller than 16x16 chosen");
    chk(n_ref1 > 0, "second reference frame chosen");
    $display("mechanisms: skip_hit=%0d ime_runs=%0d fme_lent=%0d full_pipe=%0d host_wait=%0d multi_init=%0d multi_mode=%0d quarter=%0d small_mode=%0d ref1=%0d gated=%0d/%0d/%0d",
             n_skip_hit, n_skip_miss, n_fme_lent, n_full_pipe, n_host_wait, n_multi_init, n_multi_mode,
             n_quarter, n_small_mode, n_ref1, dut.gate_cnt[0], dut.gate_cnt[1], dut.gate_cnt[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
