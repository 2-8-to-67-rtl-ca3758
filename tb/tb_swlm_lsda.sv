// tb_swlm_lsda: fills both reference windows with random pixels through the
// write port, then reads random rows and columns on port A and rows on port B
// (both in the same cycle) and compares with the written image. Checks the
// one-cycle read latency and the ladder placement: every pixel of a row or a
// column must come from a different memory.
module tb_swlm_lsda;
  import enc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic wr_en = 0, a_en = 0, a_col = 0, b_en = 0;
  logic wr_ref = 0, a_ref = 0, b_ref = 0;
  logic [6:0] wr_x = 0, a_x = 0, b_x = 0;
  logic [5:0] wr_y = 0, a_y = 0, b_y = 0;
  pix_t wr_data [16], a_data [16], b_data [16];
  pix_t img [2][SW_H][SW_W];
  swlm_lsda #(.NREF(2)) dut (.clk, .wr_en, .wr_ref, .wr_x, .wr_y, .wr_data, .a_en, .a_col,
                             .a_ref, .a_x, .a_y, .a_data, .b_en, .b_ref, .b_x, .b_y, .b_data);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int r = 0; r < 2; r++)
      for (int y = 0; y < SW_H; y++)
        for (int x = 0; x < SW_W; x++) img[r][y][x] = 8'($urandom);
    // ladder rule from the memory map: pixel (x,y) in memory (x+y) mod 16
    checks++;
    begin
      bit ok;
      ok = 1;
      for (int y = 0; y < 16; y++) begin
        bit [15:0] used_r, used_c;
        used_r = 0; used_c = 0;
        for (int i = 0; i < 16; i++) begin
          used_r[(i + y) % 16] = 1;   // row y, column i
          used_c[(y + i) % 16] = 1;   // column y, row i
        end
        if (used_r != 16'hFFFF || used_c != 16'hFFFF) ok = 0;
      end
      if (!ok) failures++;
    end
    @(negedge clk);
    for (int r = 0; r < 2; r++)
      for (int y = 0; y < SW_H; y++)
        for (int g = 0; g < SW_W / 16; g++) begin
          wr_en = 1; wr_ref = 1'(r); wr_x = 7'(16 * g); wr_y = 6'(y);
          for (int i = 0; i < 16; i++) wr_data[i] = img[r][y][16 * g + i];
          @(negedge clk);
        end
    wr_en = 0;
    for (int t = 0; t < 2000; t++) begin
      int ax, ay, bx, by, ar, br;
      bit col;
      col = 1'($urandom);
      ar = $urandom_range(0, 1); br = $urandom_range(0, 1);
      ax = col ? $urandom_range(0, SW_W - 1) : $urandom_range(0, SW_W - 16);
      ay = col ? $urandom_range(0, SW_H - 16) : $urandom_range(0, SW_H - 1);
      bx = $urandom_range(0, SW_W - 16); by = $urandom_range(0, SW_H - 1);
      a_en = 1; a_col = col; a_ref = 1'(ar); a_x = 7'(ax); a_y = 6'(ay);
      b_en = 1; b_ref = 1'(br); b_x = 7'(bx); b_y = 6'(by);
      @(negedge clk);
      a_en = 0; b_en = 0;
      for (int i = 0; i < 16; i++) begin
        pix_t ea, eb;
        ea = col ? img[ar][ay + i][ax] : img[ar][ay][ax + i];
        eb = img[br][by][bx + i];
        checks += 2;
        if (a_data[i] != ea) failures++;
        if (b_data[i] != eb) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
