// tb_fme_qbilinear: each quarter transformed residue must be the average of
// the two half-pel transforms whose samples H.264 averages at that quarter
// position (pairs written out by hand from the standard's sample table).
module tb_fme_qbilinear;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic signed [12:0] hcoef [9][4][4];
  logic signed [12:0] qcoef [16][4][4];
  fme_qbilinear dut (.hcoef, .qcoef);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int expect_pair [16][2];
    // H.264 pairs, listed by hand; half index = (hy+1)*3 + (hx+1).
    // rows: qy=-2: qx=-1,1 ; qy=-1: qx=-2..2 ; qy=0: qx=-1,1 ; qy=1: qx=-2..2 ; qy=2: qx=-1,1
    expect_pair = '{'{0, 1}, '{1, 2},
                    '{0, 3}, '{3, 1}, '{1, 4}, '{1, 5}, '{2, 5},
                    '{3, 4}, '{4, 5},
                    '{3, 6}, '{3, 7}, '{4, 7}, '{7, 5}, '{5, 8},
                    '{6, 7}, '{7, 8}};
    for (int t = 0; t < 50; t++) begin
      for (int h = 0; h < 9; h++)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) hcoef[h][r][c] = 13'($urandom_range(0, 8160) - 4080);
      #1;
      for (int q = 0; q < 16; q++)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            int a, b, e;
            a = int'(hcoef[expect_pair[q][0]][r][c]);
            b = int'(hcoef[expect_pair[q][1]][r][c]);
            e = (a + b) >>> 1;
            checks++;
            if (int'(qcoef[q][r][c]) != e) begin
              failures++;
              if (failures < 5) $display("q=%0d got %0d exp %0d", q, qcoef[q][r][c], e);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
