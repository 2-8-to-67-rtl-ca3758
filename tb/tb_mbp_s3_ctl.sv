// tb_mbp_s3_ctl: hands MB results to a modelled block engine with random
// latency; checks the handshake, the deblocking enable, the output result and
// the immediate done of an empty tick.
module tb_mbp_s3_ctl;
  import enc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, go = 0, valid = 0, be_done = 0;
  param_t prm;
  mb_res_t res_in, be_res, out_res;
  logic be_start, be_db_en, out_valid, done;
  mbp_s3_ctl dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    prm = '0;
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      mb_res_t r;
      int lat, starts, outs;
      r = mb_res_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      r.mode = pmode_e'($urandom_range(0, 4));
      prm.en_db = 1'($urandom);
      valid = (t % 5 != 4);
      res_in = r;
      go = 1;
      @(negedge clk);
      go = 0;
      res_in = '0;
      if (!valid) begin
        chk(done && !be_start, "empty tick");
        continue;
      end
      chk(be_start && be_res == r && be_db_en == prm.en_db, "hand-over");
      lat = $urandom_range(0, 20);
      starts = 0; outs = 0;
      repeat (lat) begin @(negedge clk); chk(!done, "waits for the block engine"); end
      be_done = 1;
      @(negedge clk);
      be_done = 0;
      chk(done && out_valid && out_res == r, "result out");
      @(negedge clk);
      chk(!out_valid, "one-cycle output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
