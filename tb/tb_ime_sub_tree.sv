// tb_ime_sub_tree: sums of random and extreme inputs against a plain sum.
module tb_ime_sub_tree;
  int checks = 0, failures = 0;
  logic [7:0] ad [16];
  logic [11:0] sad;
  ime_sub_tree dut (.ad, .sad);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 200; t++) begin
      int e;
      e = 0;
      for (int i = 0; i < 16; i++) begin
        ad[i] = (t == 0) ? 8'd255 : (t == 1) ? 8'(i) : 8'($urandom);
        e += int'(ad[i]);
      end
      #1;
      checks++;
      if (int'(sad) != e) begin
        failures++;
        $display("mismatch %0d vs %0d", sad, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
