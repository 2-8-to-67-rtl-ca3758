// tb_fme_quarter_pu: accumulates absolute values of random coefficient blocks
// and checks clear and hold.
module tb_fme_quarter_pu;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 0, acc = 0;
  logic signed [12:0] coef [4][4];
  logic [19:0] satd;
  fme_quarter_pu dut (.clk, .clr, .acc, .coef, .satd);
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
      clr = 1; acc = 1;
      @(negedge clk);
      clr = 0;
      sum = 0;
      checks++;
      if (satd != 0) failures++;
      for (int b = 0; b < 16; b++) begin
        acc = ($urandom_range(0, 3) != 0);
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            int v;
            v = $urandom_range(0, 8160) - 4080;
            coef[r][c] = 13'(v);
            if (acc) sum += v < 0 ? -v : v;
          end
        @(negedge clk);
        checks++;
        if (int'(satd) != sum) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
