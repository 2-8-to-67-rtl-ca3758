// ime_pe_array: 16x16 processing-element array of the IME engine.
// Each PE subtracts a reference pixel from the co-located current pixel and
// takes the absolute value, so all 256 differences of one candidate are formed
// in parallel every cycle, as in the published IME architecture. Purely combinational.
module ime_pe_array
  import enc_pkg::*;
(
  input  pix_t       cur     [16][16],
  input  pix_t       ref_blk [16][16],
  output logic [7:0] ad      [16][16]
);
  always_comb begin
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++)
        ad[y][x] = (cur[y][x] > ref_blk[y][x]) ? cur[y][x] - ref_blk[y][x]
                                               : ref_blk[y][x] - cur[y][x];
  end
endmodule
