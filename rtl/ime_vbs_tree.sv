// ime_vbs_tree: variable-block-size adder tree of the IME engine.
// Takes the SADs of the sixteen 4x4 blocks (raster order over the MB) and
// forms all 41 H.264 block SADs by reuse: 4x8 and 8x4 from pairs of 4x4,
// 8x8 from pairs of 8x4, 16x8 / 8x16 from pairs of 8x8, 16x16 from the two
// 16x8. Index layout is given in enc_pkg (0: 16x16 ... 25-40: 4x4).
// Combinational.
module ime_vbs_tree
  import enc_pkg::*;
(
  input  logic [11:0] sad4 [16],
  output sad_t        sad  [NUM_VBS]
);
  sad_t s8x4 [8], s4x8 [8], s8x8 [4];
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      int r0, c0;
      r0 = (k / 2) * 2;        // 4x4 row of the 8x8 block's top-left
      c0 = (k % 2) * 2;
      s8x4[2*k]   = sad_t'(sad4[r0*4 + c0])     + sad_t'(sad4[r0*4 + c0 + 1]);
      s8x4[2*k+1] = sad_t'(sad4[(r0+1)*4 + c0]) + sad_t'(sad4[(r0+1)*4 + c0 + 1]);
      s4x8[2*k]   = sad_t'(sad4[r0*4 + c0])     + sad_t'(sad4[(r0+1)*4 + c0]);
      s4x8[2*k+1] = sad_t'(sad4[r0*4 + c0 + 1]) + sad_t'(sad4[(r0+1)*4 + c0 + 1]);
      s8x8[k]     = s8x4[2*k] + s8x4[2*k+1];
    end
    sad[1] = s8x8[0] + s8x8[1];
    sad[2] = s8x8[2] + s8x8[3];
    sad[3] = s8x8[0] + s8x8[2];
    sad[4] = s8x8[1] + s8x8[3];
    sad[0] = sad[1] + sad[2];
    for (int k = 0; k < 4; k++) sad[5+k] = s8x8[k];
    for (int k = 0; k < 8; k++) begin
      sad[9+k]  = s8x4[k];
      sad[17+k] = s4x8[k];
    end
    for (int k = 0; k < 16; k++) sad[25+k] = sad_t'(sad4[k]);
  end
endmodule
