// tb_ime_vbs_tree: each of the 41 outputs must be the sum of the 4x4 SADs
// that fall inside that block's rectangle (geometry from the reference package).
module tb_ime_vbs_tree;
  import enc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [11:0] sad4 [16];
  sad_t sad [NUM_VBS];
  ime_vbs_tree dut (.sad4, .sad);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 16; i++) sad4[i] = (t == 0) ? 12'd4080 : 12'($urandom_range(0, 4080));
      #1;
      for (int k = 0; k < 41; k++) begin
        int x, y, w, h, e;
        vbs_geom(k, x, y, w, h);
        e = 0;
        for (int b = 0; b < 16; b++)
          if ((b % 4) * 4 >= x && (b % 4) * 4 < x + w && (b / 4) * 4 >= y && (b / 4) * 4 < y + h)
            e += int'(sad4[b]);
        checks++;
        if (int'(sad[k]) != e) begin
          failures++;
          $display("block %0d: %0d vs %0d", k, sad[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
