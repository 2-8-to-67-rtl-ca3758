// tb_ime_engine: the IME engine with a search-window memory on a random
// textured window. The current MB is a block of the window at a random MV
// plus noise. After each search all 41 best costs and MVs, and the number of
// candidates, must equal a four-step search computed here with plain SADs.
module tb_ime_engine;
  import enc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, cur_ld = 0;
  pix_t cur_in [16][16], cur_pix [16][16];
  imv_t init_pt [4];
  logic [2:0] n_init;
  imv_t mvp;
  logic [7:0] lambda;
  logic busy, done, rd_en, rd_col;
  logic [15:0] n_cand;
  logic [6:0] rd_x;
  logic [5:0] rd_y;
  pix_t rd_data [16], b_data [16];
  cost_t best_cost [NUM_VBS];
  imv_t best_mv [NUM_VBS];
  logic wr_en = 0;
  logic [6:0] wr_x;
  logic [5:0] wr_y;
  pix_t wr_data [16];
  sw_t sw;
  mb_t cur;

  swlm_lsda #(.NREF(2)) u_sw (.clk, .wr_en, .wr_ref(1'b0), .wr_x, .wr_y, .wr_data, .a_en(rd_en),
    .a_col(rd_col), .a_ref(1'b0), .a_x(rd_x), .a_y(rd_y), .a_data(rd_data), .b_en(1'b0),
    .b_ref(1'b0), .b_x(7'd0), .b_y(6'd0), .b_data);
  ime_engine #(.NINIT(4)) dut (.clk, .rst_n, .cur_ld, .cur_in, .cur_pix, .start, .init_pt, .n_init,
    .mvp, .lambda, .busy, .done, .n_cand, .rd_en, .rd_col, .rd_x, .rd_y, .rd_data, .best_cost, .best_mv);
  always #5 clk = ~clk;
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int mx, my, ix [4], iy [4], bc [41], bmx [41], bmy [41], nc, cyc;
      // smooth texture so that the search has a gradient to follow
      for (int y = 0; y < SW_H; y++)
        for (int x = 0; x < SW_W; x++)
          sw[y][x] = 8'(128 + 60 * $sin(0.21 * x + t) * $cos(0.17 * y) + $urandom_range(0, 6));
      for (int y = 0; y < SW_H; y++)
        for (int g = 0; g < SW_W / 16; g++) begin
          wr_en = 1; wr_x = 7'(16 * g); wr_y = 6'(y);
          for (int i = 0; i < 16; i++) wr_data[i] = sw[y][16 * g + i];
          @(negedge clk);
        end
      wr_en = 0;
      mx = $urandom_range(0, 40) - 20; my = $urandom_range(0, 20) - 10;
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          cur[y][x] = 8'(clip255(int'(sw[y + my + 16][x + mx + 32]) + $urandom_range(0, 4) - 2));
          cur_in[y][x] = cur[y][x];
        end
      cur_ld = 1;
      @(negedge clk);
      cur_ld = 0;
      n_init = 3'((t % 4) + 1);
      lambda = 8'(t % 3);
      mvp = '{x: 8'(mx / 2), y: 8'(my / 2)};
      ix = '{mx / 2, 0, -16, 16}; iy = '{my / 2, 0, 0, 0};
      for (int i = 0; i < 4; i++) init_pt[i] = '{x: 8'(ix[i]), y: 8'(iy[i])};
      fss_ref(sw, cur, ix, iy, int'(n_init), mx / 2, my / 2, int'(lambda), bc, bmx, bmy, nc);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      for (int k = 0; k < 41; k++)
        chk(int'(best_cost[k]) == bc[k] && int'(best_mv[k].x) == bmx[k] && int'(best_mv[k].y) == bmy[k],
            $sformatf("t%0d blk %0d: %0d (%0d,%0d) exp %0d (%0d,%0d)", t, k, best_cost[k], best_mv[k].x,
                      best_mv[k].y, bc[k], bmx[k], bmy[k]));
      chk(int'(n_cand) == nc, "candidate count");
      chk(cur_pix[5][7] == cur[5][7], "current MB held");
      $display("search %0d: %0d initial points, %0d candidates, %0d cycles, 16x16 best (%0d,%0d) true (%0d,%0d)",
               t, n_init, n_cand, cyc, int'(best_mv[0].x), int'(best_mv[0].y), mx, my);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
