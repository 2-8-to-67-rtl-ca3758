// tb_fme_engine: the FME engine with a search-window memory. For partitions
// of every shape and for centres inside and at the edge of the window it
// compares the 25 distortions, the decision (cost, MV, index) and the centre
// cost with a model that interpolates with the H.264 formulas, transforms by
// matrix product and averages half-pel transforms for quarter-pel
// candidates. Checks the latency of 12 cycles per 4x4 block plus one.
module tb_fme_engine;
  import enc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] p_x, p_y;
  logic [2:0] p_w, p_h;
  imv_t center;
  qmv_t mvp, best_mv;
  logic [7:0] lambda;
  logic [3:0] ref_bits, mode_bits;
  pix_t cur [16][16];
  logic rd_en, busy, done;
  logic [6:0] rd_x;
  logic [5:0] rd_y;
  pix_t rd_data [16], a_data [16];
  logic [21:0] best_cost, center_cost;
  logic [4:0] best_idx;
  logic wr_en = 0;
  logic [6:0] wr_x;
  logic [5:0] wr_y;
  pix_t wr_data [16];
  sw_t sw;
  mb_t curm;

  swlm_lsda #(.NREF(2)) u_sw (.clk, .wr_en, .wr_ref(1'b0), .wr_x, .wr_y, .wr_data, .a_en(1'b0),
    .a_col(1'b0), .a_ref(1'b0), .a_x(7'd0), .a_y(6'd0), .a_data, .b_en(rd_en), .b_ref(1'b0),
    .b_x(rd_x), .b_y(rd_y), .b_data(rd_data));
  fme_engine dut (.clk, .rst_n, .start, .p_x, .p_y, .p_w, .p_h, .center, .mvp, .lambda, .ref_bits,
    .mode_bits, .cur, .rd_en, .rd_x, .rd_y, .rd_data, .busy, .done, .best_mv, .best_cost, .best_idx,
    .center_cost);
  always #5 clk = ~clk;
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    int shapes [4][4];   // x, y, w, h in 4x4 units
    shapes = '{'{0, 0, 4, 4}, '{0, 2, 4, 2}, '{2, 0, 2, 4}, '{2, 2, 2, 2}};
    @(negedge clk) rst_n = 1;
    for (int y = 0; y < SW_H; y++)
      for (int x = 0; x < SW_W; x++)
        sw[y][x] = 8'(128 + 50 * $sin(0.3 * x) * $cos(0.23 * y) + $urandom_range(0, 40));
    for (int y = 0; y < SW_H; y++)
      for (int g = 0; g < SW_W / 16; g++) begin
        wr_en = 1; wr_x = 7'(16 * g); wr_y = 6'(y);
        for (int i = 0; i < 16; i++) wr_data[i] = sw[y][16 * g + i];
        @(negedge clk);
      end
    wr_en = 0;
    for (int t = 0; t < 16; t++) begin
      int cx, cy, d [25], bc, bi, cc, cyc, nb, bx, by, bw, bh;
      int s;
      s = t % 4;
      // centres: interior, and the window corners to exercise edge clamping
      case (t / 4)
        0: begin cx = 5; cy = -3; end
        1: begin cx = -32; cy = -16; end
        2: begin cx = 31; cy = 15; end
        default: begin cx = $urandom_range(0, 63) - 32; cy = $urandom_range(0, 31) - 16; end
      endcase
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          curm[y][x] = 8'(clip255(int'(sw[clampi(y + cy + 16, 0, SW_H - 1)][clampi(x + cx + 32 + 1, 0, SW_W - 1)])
                                  + $urandom_range(0, 8) - 4));
          cur[y][x] = curm[y][x];
        end
      p_x = 2'(shapes[s][0]); p_y = 2'(shapes[s][1]); p_w = 3'(shapes[s][2]); p_h = 3'(shapes[s][3]);
      center = '{x: 8'(cx), y: 8'(cy)};
      mvp = '{x: 10'(4 * cx + $urandom_range(0, 8) - 4), y: 10'(4 * cy + $urandom_range(0, 8) - 4)};
      lambda = 8'($urandom_range(0, 20));
      ref_bits = 4'($urandom_range(0, 1));
      mode_bits = 4'($urandom_range(0, 7));
      bx = 4 * shapes[s][0]; by = 4 * shapes[s][1]; bw = 4 * shapes[s][2]; bh = 4 * shapes[s][3];
      fme_ref(sw, curm, cx, cy, bx, by, bw, bh, d);
      bc = 1 << 30; bi = 0;
      for (int i = 0; i < 25; i++) begin
        int dx, dy, c;
        cand_off(i, dx, dy);
        c = d[i] + int'(lambda) * (eg_len(4 * cx + dx - int'(mvp.x)) + eg_len(4 * cy + dy - int'(mvp.y))
                                   + int'(ref_bits) + int'(mode_bits));
        if (i == 4) cc = c;
        if (c < bc) begin bc = c; bi = i; end
      end
      nb = shapes[s][2] * shapes[s][3];
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      for (int i = 0; i < 25; i++)
        chk(int'(dut.distortion[i]) == d[i], $sformatf("t%0d cand %0d: %0d exp %0d", t, i, dut.distortion[i], d[i]));
      begin
        int dx, dy;
        cand_off(bi, dx, dy);
        chk(int'(best_cost) == bc && int'(best_idx) == bi, $sformatf("t%0d decision", t));
        chk(int'(best_mv.x) == 4 * cx + dx && int'(best_mv.y) == 4 * cy + dy, "best MV");
      end
      chk(int'(center_cost) == cc, "centre cost");
      chk(cyc == 12 * nb + 1, $sformatf("latency %0d for %0d blocks", cyc, nb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
