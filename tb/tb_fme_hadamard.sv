// tb_fme_hadamard: butterfly transform against the matrix product H*X*H.
module tb_fme_hadamard;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic signed [8:0] res [4][4];
  logic signed [12:0] coef [4][4];
  fme_hadamard dut (.res, .coef);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 100; t++) begin
      int x [4][4];
      int y [4][4];
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          x[r][c] = (t == 0) ? 255 : (t == 1) ? -255 : $urandom_range(0, 510) - 255;
          res[r][c] = 9'(x[r][c]);
        end
      hadamard(x, y);
      #1;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (int'(coef[r][c]) != y[r][c]) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
