// tb_mbp_s2_ctl: drives the fine-prediction controller with a modelled FME.
// For random mode selections it checks the sequence of FME jobs (partition
// geometry, IME centre, mode bits), the buffer writes, that no job starts
// while stage 1 holds the FME, the skip path and the final result.
module tb_mbp_s2_ctl;
  import enc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, go = 0, valid = 0;
  param_t prm;
  mb_info_t info;
  logic fme_busy_s1 = 0, fme_start, fme_done = 0;
  logic [1:0] p_x, p_y;
  logic [2:0] p_w, p_h;
  imv_t center;
  logic fme_ref;
  qmv_t mvp_q;
  logic [3:0] ref_bits, mode_bits;
  logic buf_clr, buf_wr;
  pmode_e buf_mode, best_mode;
  logic [1:0] buf_part;
  qmv_t best_mv [4];
  logic [23:0] best_cost;
  mb_res_t res;
  logic done;
  mbp_s2_ctl dut (.*);
  always #5 clk = ~clk;
  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  int jobs, writes;
  int job_m [16], job_p [16];
  logic busy_prev = 0;
  always @(posedge clk) begin
    busy_prev <= fme_busy_s1;
    if (fme_start) begin
      // the start is registered: it was decided in the previous cycle
      chk(!busy_prev, "start while stage 1 holds the FME");
      fork begin
        repeat ($urandom_range(2, 8)) @(posedge clk);
        fme_done <= 1; @(posedge clk); fme_done <= 0;
      end join_none
    end
    if (buf_wr) begin
      job_m[writes] = int'(buf_mode);
      job_p[writes] = int'(buf_part);
      writes++;
    end
  end
  // stage 1 sometimes holds the FME
  always @(negedge clk) fme_busy_s1 <= ($urandom_range(0, 3) == 0);

  initial begin
    int gx [4][4], gy [4][4], gw [4], gh [4], np [4], mb [4];
    gw = '{4, 4, 2, 2}; gh = '{4, 2, 4, 2}; np = '{1, 2, 2, 4}; mb = '{1, 3, 3, 7};
    gx = '{'{0, 0, 0, 0}, '{0, 0, 0, 0}, '{0, 2, 0, 0}, '{0, 2, 0, 2}};
    gy = '{'{0, 0, 0, 0}, '{0, 2, 0, 0}, '{0, 0, 0, 0}, '{0, 0, 2, 2}};
    prm = '0;
    prm.n_ref = 2'd2;
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int k;
      info = '0;
      info.skip = (t % 7 == 3);
      info.mode_sel = 4'($urandom_range(1, 15));
      info.mvp = '{x: 8'($urandom_range(0, 20) - 10), y: 8'($urandom_range(0, 10) - 5)};
      for (int i = 0; i < 9; i++) begin
        info.imv[i] = '{x: 8'($urandom_range(0, 63) - 32), y: 8'($urandom_range(0, 31) - 16)};
        info.iref[i] = 1'($urandom_range(0, 1));
      end
      best_mode = pmode_e'($urandom_range(0, 3));
      for (int i = 0; i < 4; i++) best_mv[i] = '{x: 10'($urandom), y: 10'($urandom)};
      best_cost = 24'($urandom_range(0, 100000));
      writes = 0;
      go = 1; valid = 1;
      @(negedge clk);
      go = 0;
      k = 0;
      while (!done) begin
        @(posedge clk);
        if (fme_start && !info.skip) begin
          // expected job k
          int m, p, cnt;
          cnt = 0; m = -1; p = 0;
          for (int mm = 0; mm < 4; mm++)
            if (info.mode_sel[mm])
              for (int pp = 0; pp < np[mm]; pp++) begin
                if (cnt == k) begin m = mm; p = pp; end
                cnt++;
              end
          chk(m >= 0, "job expected");
          if (m >= 0) begin
            chk(int'(p_x) == gx[m][p] && int'(p_y) == gy[m][p] && int'(p_w) == gw[m] &&
                int'(p_h) == gh[m], $sformatf("geometry m%0d p%0d", m, p));
            chk(center == info.imv[vbs_first(pmode_e'(m)) + p], "centre from IME");
            chk(fme_ref == info.iref[vbs_first(pmode_e'(m)) + p], "reference from IME");
            chk(int'(mode_bits) == (p == 0 ? mb[m] : 0), "mode bits");
            chk(ref_bits == 4'd1, "ref bits for two references");
          end
          k++;
        end
        @(negedge clk);
      end
      if (info.skip) begin
        chk(res.mode == PM_SKIP && writes == 0 && res.ref_idx == '0, "skip result");
        chk(int'(res.mv[0].x) == 4 * int'(info.mvp.x) && int'(res.mv[0].y) == 4 * int'(info.mvp.y),
            "skip MV");
      end else begin
        int nj;
        nj = 0;
        for (int mm = 0; mm < 4; mm++) if (info.mode_sel[mm]) nj += np[mm];
        chk(k == nj && writes == nj, $sformatf("jobs %0d writes %0d exp %0d", k, writes, nj));
        chk(res.mode == best_mode && res.cost == best_cost && res.mv[3] == best_mv[3], "result");
        for (int q = 0; q < 4; q++)
          chk(res.ref_idx[q] == ((q < vbs_count(best_mode)) ? info.iref[vbs_first(best_mode) + q] : 1'b0),
              "result reference per partition");
      end
      @(negedge clk);
    end
    // empty tick
    go = 1; valid = 0; @(negedge clk); go = 0;
    chk(done, "empty tick");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
