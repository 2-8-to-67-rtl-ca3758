// ime_sra: four-configuration 16x16 reference-pixel systolic register array.
//
// Holds the 16x16 reference block of the candidate being evaluated. Each
// enabled cycle it takes one of four shift configurations, so that the
// candidate moves by one pixel up, down, left or right while 240 of the 256
// pixels are reused; only the row or column that enters at the edge comes
// from the search-window memories. Configurations follow the published IME architecture; the
// naming by candidate motion is this design's choice:
//   MV_DOWN  : rows move up,    new row  enters at row 15 (in[i] -> column i)
//   MV_UP    : rows move down,  new row  enters at row 0
//   MV_RIGHT : columns move left,  new column enters at column 15 (in[i] -> row i)
//   MV_LEFT  : columns move right, new column enters at column 0
// A full load is 16 MV_DOWN shifts. Timing: one shift per enabled clock.
module ime_sra
  import enc_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  dir_e dir,
  input  pix_t in  [16],
  output pix_t ref_blk [16][16]   // [row][column]
);
  pix_t r [16][16];

  always_ff @(posedge clk) begin
    if (en) begin
      for (int y = 0; y < 16; y++) begin
        for (int x = 0; x < 16; x++) begin
          unique case (dir)
            MV_DOWN:  r[y][x] <= (y == 15) ? in[x] : r[y+1][x];
            MV_UP:    r[y][x] <= (y == 0)  ? in[x] : r[y-1][x];
            MV_RIGHT: r[y][x] <= (x == 15) ? in[y] : r[y][x+1];
            MV_LEFT:  r[y][x] <= (x == 0)  ? in[y] : r[y][x-1];
          endcase
        end
      end
    end
  end

  assign ref_blk = r;
endmodule
