// tb_ime_best_info: random SAD sets and MVs; a model here keeps the strict
// minimum per block; checks clear, update, hold and first-wins on ties.
module tb_ime_best_info;
  import enc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, upd = 0;
  sad_t sad [NUM_VBS];
  cost_t mv_cost;
  imv_t mv;
  cost_t best_cost [NUM_VBS];
  imv_t best_mv [NUM_VBS];
  int mc [NUM_VBS];
  imv_t mm [NUM_VBS];
  ime_best_info dut (.clk, .rst_n, .clr, .upd, .sad, .mv_cost, .mv, .best_cost, .best_mv);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      clr = (t % 100 == 0);
      upd = !clr && ($urandom_range(0, 3) != 0);
      mv = '{x: 8'($urandom_range(0, 63) - 32), y: 8'($urandom_range(0, 31) - 16)};
      mv_cost = cost_t'($urandom_range(0, 3) * 16);
      for (int k = 0; k < NUM_VBS; k++) sad[k] = sad_t'($urandom_range(0, 60) * 8);
      @(negedge clk);
      for (int k = 0; k < NUM_VBS; k++) begin
        if (clr) begin mc[k] = 32'h3FFFF; mm[k] = '0; end
        else if (upd && int'(sad[k]) + int'(mv_cost) < mc[k]) begin
          mc[k] = int'(sad[k]) + int'(mv_cost);
          mm[k] = mv;
        end
        checks++;
        if (int'(best_cost[k]) != mc[k] || best_mv[k] != mm[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
