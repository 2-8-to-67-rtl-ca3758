// tb_fme_interp: the nine half-pel predictions of a 4x4 block against the
// H.264 sample formulas evaluated on a search window holding the 10x10 patch.
module tb_fme_interp;
  import enc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  pix_t win [10][10];
  pix_t pred [9][4][4];
  sw_t sw;
  fme_interp dut (.win, .pred);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 30; t++) begin
      // the patch sits at window (20..29, 10..19); the block at (23, 13)
      for (int y = 0; y < SW_H; y++)
        for (int x = 0; x < SW_W; x++) sw[y][x] = 8'($urandom);
      if (t == 1)   // extremes to exercise clipping
        for (int y = 0; y < 10; y++)
          for (int x = 0; x < 10; x++) sw[10 + y][20 + x] = ((x + y) % 2) ? 8'd255 : 8'd0;
      for (int y = 0; y < 10; y++)
        for (int x = 0; x < 10; x++) win[y][x] = sw[10 + y][20 + x];
      #1;
      for (int h = 0; h < 9; h++)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            int e;
            e = half_sample(sw, 2 * (23 + c) + (h % 3 - 1), 2 * (13 + r) + (h / 3 - 1));
            checks++;
            if (int'(pred[h][r][c]) != e) begin
              failures++;
              if (failures < 5) $display("h=%0d r=%0d c=%0d got %0d exp %0d", h, r, c, pred[h][r][c], e);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
