// tb_ime_pe_array: random current/reference blocks; every PE output must equal
// the absolute difference computed here.
module tb_ime_pe_array;
  import enc_pkg::*;
  int checks = 0, failures = 0;
  pix_t cur [16][16], ref_blk [16][16];
  logic [7:0] ad [16][16];
  ime_pe_array dut (.cur, .ref_blk, .ad);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          cur[y][x] = 8'($urandom);
          ref_blk[y][x] = (t == 0) ? 8'd255 - cur[y][x] : 8'($urandom);
        end
      #1;
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          int e;
          e = int'(cur[y][x]) - int'(ref_blk[y][x]);
          if (e < 0) e = -e;
          checks++;
          if (int'(ad[y][x]) != e) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
