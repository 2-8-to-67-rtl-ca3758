// tb_fme_half_pu: accumulates the SATD of several random 4x4 blocks and
// compares the transform output and the running sum with the matrix model.
module tb_fme_half_pu;
  import enc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 0, acc = 0;
  pix_t orig [4][4], pred [4][4];
  logic signed [12:0] coef [4][4];
  logic [19:0] satd;
  fme_half_pu dut (.clk, .clr, .acc, .orig, .pred, .coef, .satd);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int sum;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      clr = 1; acc = 0;
      @(negedge clk);
      clr = 0;
      sum = 0;
      for (int b = 0; b < 16; b++) begin
        int x [4][4];
        int y [4][4];
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            orig[r][c] = 8'($urandom);
            pred[r][c] = (b == 0 && t == 0) ? 8'd255 - orig[r][c] : 8'($urandom);
            x[r][c] = int'(orig[r][c]) - int'(pred[r][c]);
          end
        hadamard(x, y);
        acc = ($urandom_range(0, 4) != 0);
        #1;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            checks++;
            if (int'(coef[r][c]) != y[r][c]) failures++;
            if (acc) sum += y[r][c] < 0 ? -y[r][c] : y[r][c];
          end
        @(negedge clk);
        checks++;
        if (int'(satd) != sum) failures++;
      end
      acc = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
