// tb_fme_rdo_md: costs of 25 candidates with random distortions and MV
// predictors; winner, its MV and cost, and the centre cost against a plain
// search written here.
module tb_fme_rdo_md;
  import enc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [19:0] distortion [25];
  qmv_t center, mvp, best_mv;
  logic [7:0] lambda;
  logic [3:0] ref_bits, mode_bits;
  logic [21:0] best_cost, center_cost;
  logic [4:0] best_idx;
  fme_rdo_md dut (.distortion, .center, .mvp, .lambda, .ref_bits, .mode_bits, .best_mv,
                  .best_cost, .best_idx, .center_cost);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 300; t++) begin
      int bc, bi, cc, cxv, cyv, pxv, pyv;
      cxv = 4 * ($urandom_range(0, 40) - 20);
      cyv = 4 * ($urandom_range(0, 20) - 10);
      pxv = $urandom_range(0, 80) - 40;
      pyv = $urandom_range(0, 40) - 20;
      center = '{x: 10'(cxv), y: 10'(cyv)};
      mvp = '{x: 10'(pxv), y: 10'(pyv)};
      lambda = 8'($urandom_range(0, 40));
      ref_bits = 4'($urandom_range(0, 1));
      mode_bits = 4'($urandom_range(0, 7));
      for (int i = 0; i < 25; i++)
        distortion[i] = (t % 3 == 0) ? 20'd500 : 20'($urandom_range(100, 5000));
      #1;
      bc = 1 << 30; bi = 0;
      for (int i = 0; i < 25; i++) begin
        int dx, dy, c;
        cand_off(i, dx, dy);
        c = int'(distortion[i]) + int'(lambda) * (eg_len(cxv + dx - pxv) + eg_len(cyv + dy - pyv)
                                                  + int'(ref_bits) + int'(mode_bits));
        if (i == 4) cc = c;
        if (c < bc) begin bc = c; bi = i; end
      end
      checks += 3;
      if (int'(best_cost) != bc) failures++;
      if (int'(center_cost) != cc) failures++;
      begin
        int dx, dy;
        cand_off(bi, dx, dy);
        if (int'(best_mv.x) != cxv + dx || int'(best_mv.y) != cyv + dy) begin
          failures++;
          $display("t=%0d idx %0d vs %0d", t, best_idx, bi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
