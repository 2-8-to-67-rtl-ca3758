// tb_mbp_s1_ctl: drives the coarse-prediction controller with modelled FME
// and IME engines. Covers an empty tick, pre-skip hits and misses, pre-skip
// disabled, one or two references (one IME run each, per-block choice of the
// cheaper reference, ties to reference 0), and the pre-mode selection of the
// n_vbs cheapest partition modes (checked against a sort done here).
module tb_mbp_s1_ctl;
  import enc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, go = 0, valid = 0;
  param_t prm;
  imv_t mvp;
  logic fme_req, fme_start, fme_done = 0, ime_start, ime_ref, ime_done = 0, skip_hit, done;
  logic [21:0] fme_center_cost;
  imv_t ime_init [4];
  cost_t ime_cost [NUM_VBS];
  imv_t ime_mv [NUM_VBS];
  mb_info_t info;
  int n_fme, n_ime, n_skip;
  cost_t cost_r [2][NUM_VBS];   // IME results the model returns per reference
  imv_t  mv_r   [2][NUM_VBS];
  mbp_s1_ctl dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  // engine models
  always @(posedge clk) begin
    if (fme_start) begin
      n_fme++;
      fork begin
        repeat ($urandom_range(2, 10)) @(posedge clk);
        fme_done <= 1; @(posedge clk); fme_done <= 0;
      end join_none
    end
    if (ime_start) begin
      n_ime++;
      ime_cost = cost_r[ime_ref];
      ime_mv   = mv_r[ime_ref];
      fork begin
        repeat ($urandom_range(2, 30)) @(posedge clk);
        ime_done <= 1; @(posedge clk); ime_done <= 0;
      end join_none
    end
    if (skip_hit) n_skip++;
  end
  initial begin
    prm = '0;
    prm.n_vbs = 3'd1;
    prm.skip_th = 22'd1000;
    n_fme = 0; n_ime = 0; n_skip = 0;
    @(negedge clk) rst_n = 1;
    // empty tick
    go = 1; valid = 0; @(negedge clk); go = 0;
    chk(done, "empty tick done next cycle");
    for (int t = 0; t < 60; t++) begin
      int fme0, ime0, skip0, mc [4], cnt;
      bit exp_skip;
      prm.en_preskip = 1'(t % 3 != 0);
      prm.n_vbs = 3'($urandom_range(1, 4));
      mvp = '{x: 8'($urandom_range(0, 20) - 10), y: 8'($urandom_range(0, 10) - 5)};
      fme_center_cost = 22'($urandom_range(500, 1500));
      prm.n_ref = 2'($urandom_range(1, 2));
      for (int r = 0; r < 2; r++)
        for (int k = 0; k < NUM_VBS; k++) begin
          cost_r[r][k] = cost_t'($urandom_range(100, 900));
          if (k % 5 == 2) cost_r[r][k] = cost_r[0][k];      // ties keep reference 0
          mv_r[r][k] = '{x: 8'($urandom_range(0, 63) - 32), y: 8'($urandom_range(0, 31) - 16)};
        end
      exp_skip = prm.en_preskip && fme_center_cost < prm.skip_th;
      fme0 = n_fme; ime0 = n_ime; skip0 = n_skip;
      go = 1; valid = 1;
      @(negedge clk);
      go = 0;
      cnt = 0;
      while (!done) begin
        if (fme_start) chk(fme_req, "fme_req with start");
        @(negedge clk);
        cnt++;
      end
      chk(info.skip == exp_skip, "skip decision");
      chk(info.mvp == mvp, "mvp kept");
      chk(ime_init[0] == mvp, "first initial point is the MV predictor");
      chk(n_fme - fme0 == int'(prm.en_preskip), "FME used once iff pre-skip enabled");
      chk(n_ime - ime0 == (exp_skip ? 0 : int'(prm.n_ref)), "IME once per reference, skipped iff pre-skip hit");
      chk(n_skip - skip0 == int'(exp_skip), "skip_hit pulse");
      chk(!fme_req, "FME released");
      if (!exp_skip) begin
        int order [4], ec [9], er [9];
        logic [3:0] es;
        for (int k = 0; k < 9; k++) begin
          er[k] = (prm.n_ref == 2 && cost_r[1][k] < cost_r[0][k]) ? 1 : 0;
          ec[k] = cost_r[er[k]][k];
        end
        mc[0] = ec[0]; mc[1] = ec[1] + ec[2]; mc[2] = ec[3] + ec[4];
        mc[3] = ec[5] + ec[6] + ec[7] + ec[8];
        order = '{0, 1, 2, 3};
        for (int i = 0; i < 4; i++)          // stable selection sort by cost
          for (int j = i + 1; j < 4; j++)
            if (mc[order[j]] < mc[order[i]] ||
                (mc[order[j]] == mc[order[i]] && order[j] < order[i])) begin
              int tmp; tmp = order[i]; order[i] = order[j]; order[j] = tmp;
            end
        es = '0;
        for (int i = 0; i < int'(prm.n_vbs); i++) es[order[i]] = 1;
        chk(info.mode_sel == es, $sformatf("mode_sel %b exp %b", info.mode_sel, es));
        for (int k = 0; k < 9; k++) begin
          chk(info.imv[k] == mv_r[er[k]][k], "imv of the better reference");
          chk(info.iref[k] == 1'(er[k]), "reference of each block");
        end
      end
      repeat (2) @(negedge clk);
    end
    chk(n_skip > 0 && n_skip < 60, "both pre-skip outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
