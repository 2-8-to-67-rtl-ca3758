// fme_half_pu: processing unit of one half-pel candidate.
// Subtracts the interpolated prediction from the original 4x4 block, takes the
// Hadamard transform of the residue (exported, for the quarter-pel bilinear
// array) and accumulates the sum of absolute coefficients over the 4x4 blocks
// of a partition. clr zeroes the accumulator; acc adds the current block at
// the clock edge. Structure (Sub., Hadamard, Abs. & Acc.) from the published FME architecture.
module fme_half_pu
  import enc_pkg::*;
(
  input  logic clk,
  input  logic clr,
  input  logic acc,
  input  pix_t orig [4][4],
  input  pix_t pred [4][4],
  output logic signed [12:0] coef [4][4],
  output logic [19:0] satd
);
  logic signed [8:0] res [4][4];
  logic [16:0] blk_sum;

  always_comb
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        res[r][c] = $signed({1'b0, orig[r][c]}) - $signed({1'b0, pred[r][c]});

  fme_hadamard u_had (.res, .coef);

  always_comb begin
    blk_sum = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        blk_sum += 17'(coef[r][c] < 0 ? -coef[r][c] : coef[r][c]);
  end

  always_ff @(posedge clk)
    if (clr)      satd <= '0;
    else if (acc) satd <= satd + 20'(blk_sum);
endmodule
