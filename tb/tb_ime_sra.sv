// tb_ime_sra: loads the array with 16 down-moves, then takes a random walk
// over a random 64x64 image, feeding the entering row or column, and checks
// after every shift that the array equals the image block at the tracked
// position.
module tb_ime_sra;
  import enc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, en = 0;
  dir_e dir;
  pix_t in [16];
  pix_t ref_blk [16][16];
  pix_t img [64][64];
  int px, py;
  ime_sra dut (.clk, .en, .dir, .in, .ref_blk);
  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic shift(input dir_e d);
    int nx, ny;
    nx = px + (d == MV_RIGHT) - (d == MV_LEFT);
    ny = py + (d == MV_DOWN) - (d == MV_UP);
    for (int i = 0; i < 16; i++)
      case (d)
        MV_DOWN:  in[i] = img[ny + 15][nx + i];
        MV_UP:    in[i] = img[ny][nx + i];
        MV_RIGHT: in[i] = img[ny + i][nx + 15];
        default:  in[i] = img[ny + i][nx];
      endcase
    dir = d;
    en = 1;
    @(posedge clk);
    #1 en = 0;
    px = nx;
    py = ny;
  endtask
  initial begin
    for (int y = 0; y < 64; y++)
      for (int x = 0; x < 64; x++) img[y][x] = 8'($urandom);
    px = 20; py = 4;
    for (int k = 0; k < 16; k++) shift(MV_DOWN);   // fill: block now at (20,20)
    for (int s = 0; s < 300; s++) begin
      dir_e d;
      d = dir_e'($urandom_range(0, 3));
      if (d == MV_LEFT && px == 0) d = MV_RIGHT;
      if (d == MV_RIGHT && px == 48) d = MV_LEFT;
      if (d == MV_UP && py == 0) d = MV_DOWN;
      if (d == MV_DOWN && py == 48) d = MV_UP;
      shift(d);
      // an idle cycle must hold the contents
      if (s % 7 == 0) @(posedge clk);
      #1;
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          checks++;
          if (ref_blk[y][x] != img[py + y][px + x]) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
