// fme_qbilinear: quarter transformed-residue bilinear filter array.
// Because prediction, residue and Hadamard transform are all linear, the
// transformed residue of a quarter-pel candidate is the average of the
// transformed residues of the two half-pel candidates its H.264 quarter sample
// averages. The 16 quarter candidates are the offsets (qx,qy) in -2..+2
// quarter pels with at least one odd coordinate, in raster order. With one odd
// coordinate the two neighbours along that axis are used; with both odd the
// pair of diagonal neighbours that lie on the axes through the integer
// candidate (H.264 positions e, g, p, r average one horizontal and one
// vertical half sample). The average is (a+b) >>> 1 on the coefficients, so
// it may differ by the pixel-domain rounding from a direct computation.
// Half index h = (hy+1)*3 + (hx+1) in half-pel units. Combinational.
module fme_qbilinear (
  input  logic signed [12:0] hcoef [9][4][4],
  output logic signed [12:0] qcoef [16][4][4]
);
  function automatic int hidx(input int qx, input int qy);   // even quarter offsets
    return (qy / 2 + 1) * 3 + (qx / 2 + 1);
  endfunction

  always_comb begin
    int q;
    q = 0;
    for (int qy = -2; qy <= 2; qy++)
      for (int qx = -2; qx <= 2; qx++)
        if ((qx % 2 != 0) || (qy % 2 != 0)) begin
          int a, b;
          if (qx % 2 != 0 && qy % 2 != 0) begin
            // the two diagonal neighbours with one coordinate equal to 0
            if ((qx > 0) == (qy > 0)) begin
              a = hidx(qx + 1, qy - 1);   // e.g. (1,1): (2,0) and (0,2)
              b = hidx(qx - 1, qy + 1);
            end else begin
              a = hidx(qx - 1, qy - 1);   // e.g. (-1,1): (-2,0) and (0,2)
              b = hidx(qx + 1, qy + 1);
            end
          end else if (qx % 2 != 0) begin
            a = hidx(qx - 1, qy);
            b = hidx(qx + 1, qy);
          end else begin
            a = hidx(qx, qy - 1);
            b = hidx(qx, qy + 1);
          end
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++)
              qcoef[q][r][c] = 13'((14'(hcoef[a][r][c]) + 14'(hcoef[b][r][c])) >>> 1);
          q++;
        end
  end
endmodule
