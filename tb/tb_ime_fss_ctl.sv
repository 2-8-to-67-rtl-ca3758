// tb_ime_fss_ctl: runs the search controller against a modelled array whose
// 16x16 SAD is a bowl-shaped function of the candidate position. The
// testbench tracks the array position from the shift commands and checks
// that every memory read fetches the row or column that enters the array,
// that each update carries the position the array really holds, that only
// single-pel moves are made inside the search range, and that the search
// ends at the candidate a four-step search computed here finds.
module tb_ime_fss_ctl;
  import enc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  imv_t init_pt [4];
  logic [2:0] n_init;
  imv_t mvp;
  logic [7:0] lambda;
  sad_t sad16;
  logic rd_en, rd_col, sra_en, clr, upd, busy, done;
  logic [6:0] rd_x;
  logic [5:0] rd_y;
  dir_e sra_dir;
  imv_t upd_mv;
  cost_t upd_mv_cost;
  logic [15:0] n_cand;
  ime_fss_ctl #(.NINIT(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int ox, oy;          // bowl centre
  int pos_x, pos_y;    // tracked array position (after fills: valid)
  int fill;            // rows loaded since the last reload
  bit req_v; bit req_col; int req_x, req_y;
  function automatic int bowl(input int x, input int y);
    return 3 * ((x - ox) * (x - ox) + (y - oy) * (y - oy)) + ((x * 7 + y * 13) & 3);
  endfunction
  assign sad16 = sad_t'(bowl(pos_x, pos_y));

  // model of memory + array
  always @(posedge clk) begin
    if (rst_n && upd) chk(int'(upd_mv.x) == pos_x && int'(upd_mv.y) == pos_y, "update position");
    if (rst_n && sra_en) begin
      chk(req_v, "shift without a read");
      case (sra_dir)
        MV_DOWN: begin
          if (fill < 16) begin
            chk(!req_col && req_x == pos_x + 32 && req_y == pos_y + 16 + fill, "reload row read");
            fill++;
          end else begin
            pos_y++;
            chk(!req_col && req_x == pos_x + 32 && req_y == pos_y + 16 + 15, "down read");
          end
        end
        MV_UP:    begin pos_y--; chk(!req_col && req_x == pos_x + 32 && req_y == pos_y + 16, "up read"); end
        MV_RIGHT: begin pos_x++; chk(req_col && req_x == pos_x + 32 + 15 && req_y == pos_y + 16, "right read"); end
        default:  begin pos_x--; chk(req_col && req_x == pos_x + 32 && req_y == pos_y + 16, "left read"); end
      endcase
      chk(in_sr(pos_x, pos_y) || fill < 16, "inside the search range");
    end
    req_v <= rd_en; req_col <= rd_col; req_x <= int'(rd_x); req_y <= int'(rd_y);
  end

  // reference search over the bowl
  function automatic void ref_search(input int ix [4], input int iy [4], input int n, input int lam,
                                     output int bx, output int by, output int ncand);
    int oxs [9], oys [9], best;
    oxs = '{0, -1, -1, 0, 1, 1, 1, 0, -1};
    oys = '{0, 0, -1, -1, -1, 0, 1, 1, 1};
    best = 1 << 30; bx = 0; by = 0; ncand = 0;
    for (int it = 0; it < n; it++) begin
      int cx, cy, lc, lx, ly, step;
      bit fine;
      cx = clampi(ix[it], -32, 31); cy = clampi(iy[it], -16, 15);
      lc = 1 << 30; lx = 0; ly = 0; step = 1; fine = 0;
      forever begin
        for (int i = 0; i < 9; i++) begin
          int sx, sy, c;
          sx = cx + (fine ? 1 : 2) * oxs[i]; sy = cy + (fine ? 1 : 2) * oys[i];
          if (!in_sr(sx, sy)) continue;
          ncand++;
          c = bowl(sx, sy) + mv_rate(sx, sy, int'(mvp.x), int'(mvp.y), lam);
          if (c < lc) begin lc = c; lx = sx; ly = sy; end
          if (c < best) begin best = c; bx = sx; by = sy; end
        end
        if (fine) break;
        if ((lx != cx || ly != cy) && step != 3) begin step++; cx = lx; cy = ly; end
        else begin fine = 1; cx = lx; cy = ly; end
      end
    end
  endfunction

  int best_c, best_x, best_y;
  always @(posedge clk) begin
    if (clr) best_c = 1 << 30;
    if (upd && int'(sad16) + int'(upd_mv_cost) < best_c) begin
      best_c = int'(sad16) + int'(upd_mv_cost);
      best_x = int'(upd_mv.x); best_y = int'(upd_mv.y);
    end
  end

  // reload detection: the controller reloads with 16 down moves at each
  // initial point; the tracked position is set from the initial point
  int it_seen;
  initial begin
    req_v = 0;
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int ix [4], iy [4], ex, ey, nc;
      ox = $urandom_range(0, 70) - 35; oy = $urandom_range(0, 36) - 18;
      n_init = 3'($urandom_range(1, 4));
      lambda = 8'($urandom_range(0, 2));
      mvp = '{x: 8'($urandom_range(0, 10) - 5), y: 8'($urandom_range(0, 6) - 3)};
      for (int i = 0; i < 4; i++) begin
        ix[i] = $urandom_range(0, 80) - 40; iy[i] = $urandom_range(0, 40) - 20;
        init_pt[i] = '{x: 8'(ix[i]), y: 8'(iy[i])};
      end
      ref_search(ix, iy, int'(n_init), int'(lambda), ex, ey, nc);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      it_seen = 0;
      while (!done) begin
        // a reload starts when the controller issues 16 reads with no update
        // pending; track it via the internal fill counter through the ports:
        // the first down read of a reload has rd_y = init_y + 16
        @(posedge clk);
        if (dut.state == dut.S_FILL && dut.fill_cnt == 0) begin
          pos_x = clampi(ix[it_seen], -32, 31);
          pos_y = clampi(iy[it_seen], -16, 15);
          fill = 0;
          it_seen++;
        end
        @(negedge clk);
      end
      chk(it_seen == int'(n_init), "one reload per initial point");
      chk(best_x == ex && best_y == ey, $sformatf("best (%0d,%0d) exp (%0d,%0d)", best_x, best_y, ex, ey));
      chk(int'(n_cand) == nc, $sformatf("candidates %0d exp %0d", n_cand, nc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
