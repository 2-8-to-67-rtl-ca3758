// fme_interp: half-pixel interpolation engine (6-tap 2-D filter).
//
// From a 10x10 window of integer reference pixels (the 4x4 block at the best
// integer candidate plus 3 pixels on the top/left and 3 on the bottom/right)
// it forms the prediction of the 4x4 block for each of the nine half-pel
// candidates around that integer candidate, so that the interpolated pixels
// are shared by the nine half PUs. Samples follow the H.264 luma rule:
// b/h = clip((E-5F+20G+20H-5I+J + 16) >> 5) for horizontal/vertical half
// positions and j = clip((sum of 6 taps over the unrounded b values + 512)
// >> 10) for the centre positions.
// Output pred[h][row][col], h = (hy+1)*3 + (hx+1) for half offsets hx,hy in
// {-1,0,+1}; h = 4 is the integer candidate itself. Combinational.
// The 10-pixel width comes from the published FME architecture; doing the whole block in one
// step rather than row by row is this design's simplification.
module fme_interp
  import enc_pkg::*;
(
  input  pix_t win  [10][10],     // [row][col]
  output pix_t pred [9][4][4]
);
  function automatic int tap6(input int e, input int f, input int g, input int h,
                              input int i, input int j);
    return e - 5*f + 20*g + 20*h - 5*i + j;
  endfunction
  function automatic pix_t clip(input int v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
  endfunction

  int b1 [10][5];   // horizontal half between window cols k+2 and k+3, all rows
  int h1 [5][4];    // vertical half between window rows k+2 and k+3, cols 3..6
  int j1 [5][5];

  always_comb begin
    for (int r = 0; r < 10; r++)
      for (int k = 0; k < 5; k++)
        b1[r][k] = tap6(int'(win[r][k]), int'(win[r][k+1]), int'(win[r][k+2]),
                        int'(win[r][k+3]), int'(win[r][k+4]), int'(win[r][k+5]));
    for (int k = 0; k < 5; k++)
      for (int c = 0; c < 4; c++)
        h1[k][c] = tap6(int'(win[k][c+3]), int'(win[k+1][c+3]), int'(win[k+2][c+3]),
                        int'(win[k+3][c+3]), int'(win[k+4][c+3]), int'(win[k+5][c+3]));
    for (int k = 0; k < 5; k++)
      for (int m = 0; m < 5; m++)
        j1[k][m] = tap6(b1[k][m], b1[k+1][m], b1[k+2][m], b1[k+3][m], b1[k+4][m], b1[k+5][m]);

    for (int hy = 0; hy < 3; hy++)
      for (int hx = 0; hx < 3; hx++)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            int kx, ky;
            kx = c + ((hx == 2) ? 1 : 0);
            ky = r + ((hy == 2) ? 1 : 0);
            if (hx == 1 && hy == 1)      pred[hy*3+hx][r][c] = win[r+3][c+3];
            else if (hy == 1)            pred[hy*3+hx][r][c] = clip((b1[r+3][kx] + 16) >>> 5);
            else if (hx == 1)            pred[hy*3+hx][r][c] = clip((h1[ky][c] + 16) >>> 5);
            else                         pred[hy*3+hx][r][c] = clip((j1[ky][kx] + 512) >>> 10);
          end
  end
endmodule
