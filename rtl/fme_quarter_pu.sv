// fme_quarter_pu: processing unit of one quarter-pel candidate.
// Its transformed residue comes ready from the bilinear filter array, so it
// only takes absolute values and accumulates them over the 4x4 blocks of a
// partition (Abs. & Acc. in the published FME architecture): no memory access, interpolation
// or transform is spent on quarter-pel candidates. clr zeroes, acc adds.
module fme_quarter_pu (
  input  logic clk,
  input  logic clr,
  input  logic acc,
  input  logic signed [12:0] coef [4][4],
  output logic [19:0] satd
);
  logic [16:0] blk_sum;
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
