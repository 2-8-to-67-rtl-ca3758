// tb_fme_best_buf: writes random partition results for random subsets of
// modes and checks the chosen mode, its MVs and summed cost; also checks that
// a mode with a missing partition is not chosen and that clr empties it.
module tb_fme_best_buf;
  import enc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, wr_en = 0;
  pmode_e wr_mode;
  logic [1:0] wr_part;
  qmv_t wr_mv;
  logic [21:0] wr_cost;
  logic any_valid;
  pmode_e best_mode;
  qmv_t best_mv [4];
  logic [23:0] best_cost;
  fme_best_buf dut (.clk, .rst_n, .clr, .wr_en, .wr_mode, .wr_part, .wr_mv, .wr_cost, .any_valid,
                    .best_mode, .best_mv, .best_cost);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int tot [4];
      qmv_t mvs [4][4];
      bit complete [4];
      int np [4];
      int bm, bc;
      np = '{1, 2, 2, 4};
      clr = 1;
      @(negedge clk);
      clr = 0;
      checks++;
      if (any_valid) failures++;
      for (int m = 0; m < 4; m++) begin
        int nw;
        tot[m] = 0;
        // sometimes leave the last partition unwritten
        nw = ($urandom_range(0, 4) == 0) ? np[m] - 1 : np[m];
        if ($urandom_range(0, 2) == 0) nw = 0;
        complete[m] = (nw == np[m]);
        for (int p = 0; p < nw; p++) begin
          wr_en = 1; wr_mode = pmode_e'(m); wr_part = 2'(p);
          wr_mv = '{x: 10'($urandom), y: 10'($urandom)};
          wr_cost = 22'($urandom_range(0, 3000));
          mvs[m][p] = wr_mv;
          tot[m] += int'(wr_cost);
          @(negedge clk);
        end
        wr_en = 0;
      end
      bm = -1; bc = 0;
      for (int m = 0; m < 4; m++)
        if (complete[m] && (bm < 0 || tot[m] < bc)) begin bm = m; bc = tot[m]; end
      checks++;
      if (any_valid != (bm >= 0)) failures++;
      if (bm >= 0) begin
        checks += 2;
        if (int'(best_mode) != bm || int'(best_cost) != bc) failures++;
        for (int p = 0; p < np[bm]; p++) if (best_mv[p] != mvs[bm][p]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
