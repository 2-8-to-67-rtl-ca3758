// fme_hadamard: 4x4 Hadamard transform engine of a half PU.
// Transforms a 4x4 residue block, rows then columns, with the butterfly
// (a+b)+(c+d), (a+b)-(c+d), (a-b)-(c-d), (a-b)+(c-d) on each line; the sum of
// the absolute coefficients is the SATD distortion used by the FME.
// Coefficient order is [row][col] of the transformed block. Combinational.
module fme_hadamard (
  input  logic signed [8:0]  res  [4][4],
  output logic signed [12:0] coef [4][4]
);
  logic signed [12:0] t [4][4];
  always_comb begin
    for (int r = 0; r < 4; r++) begin
      logic signed [12:0] s0, s1, d0, d1;
      s0 = 13'(res[r][0]) + 13'(res[r][1]);
      s1 = 13'(res[r][2]) + 13'(res[r][3]);
      d0 = 13'(res[r][0]) - 13'(res[r][1]);
      d1 = 13'(res[r][2]) - 13'(res[r][3]);
      t[r][0] = s0 + s1;
      t[r][1] = s0 - s1;
      t[r][2] = d0 - d1;
      t[r][3] = d0 + d1;
    end
    for (int c = 0; c < 4; c++) begin
      logic signed [12:0] s0, s1, d0, d1;
      s0 = t[0][c] + t[1][c];
      s1 = t[2][c] + t[3][c];
      d0 = t[0][c] - t[1][c];
      d1 = t[2][c] - t[3][c];
      coef[0][c] = s0 + s1;
      coef[1][c] = s0 - s1;
      coef[2][c] = d0 - d1;
      coef[3][c] = d0 + d1;
    end
  end
endmodule
