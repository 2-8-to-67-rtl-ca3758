// tb_sys_ctl: writes and reads back the coding parameters, then runs the MB
// pipeline for several MB counts with stage controllers modelled here that
// answer after random delays. Checks the stage-valid pattern of every tick,
// that a tick never starts before all stages are done or before the host
// announced the next MB, the number of ticks and frame_done.
module tb_sys_ctl;
  import enc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic rf_we = 0;
  logic [7:0] rf_addr = 0;
  logic [31:0] rf_wdata = 0, rf_rdata;
  param_t prm;
  logic go, mb_take, busy, frame_done;
  logic [2:0] stage_valid, stage_done;
  logic [15:0] tick;
  sys_ctl dut (.clk, .rf_clk(clk), .rst_n, .rf_we, .rf_addr, .rf_wdata, .rf_rdata, .prm, .go,
               .stage_valid, .stage_done, .mb_take, .busy, .frame_done, .tick);
  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    rf_we = 1; rf_addr = a; rf_wdata = d;
    @(negedge clk);
    rf_we = 0;
  endtask

  // stage models: done after a random delay, or at once if not valid
  int pending [3];
  int outstanding;
  bit host_ready;
  always @(posedge clk) begin
    for (int s = 0; s < 3; s++) begin
      stage_done[s] <= 1'b0;
      if (go) pending[s] <= stage_valid[s] ? $urandom_range(1, 20) : 1;
      else if (pending[s] == 1) begin stage_done[s] <= 1'b1; pending[s] <= 0; end
      else if (pending[s] > 1) pending[s] <= pending[s] - 1;
    end
  end

  initial begin
    stage_done = '0;
    pending = '{0, 0, 0};
    @(negedge clk) rst_n = 1;
    wr(RA_TH, 32'd1234); wr(RA_NINIT, 3); wr(RA_NREF, 2); wr(RA_NVBS, 2); wr(RA_LAMBDA, 17);
    wr(RA_ENABLE, 32'b1011);
    rf_addr = RA_TH;     #1 chk(rf_rdata == 1234, "TH");
    rf_addr = RA_NINIT;  #1 chk(rf_rdata == 3, "NINIT");
    rf_addr = RA_LAMBDA; #1 chk(rf_rdata == 17, "LAMBDA");
    rf_addr = RA_ENABLE; #1 chk(rf_rdata == 32'b1011, "ENABLE");
    chk(prm.en_preskip && prm.en_intra4 && !prm.en_intra16 && prm.en_db && prm.n_vbs == 2, "prm");
    for (int n = 1; n <= 5; n++) begin
      int ticks, takes;
      wr(RA_NUMMB, n);
      wr(RA_CTRL, 1);
      ticks = 0; takes = 0;
      fork
        begin : host
          for (int m = 0; m < n; m++) begin
            repeat ($urandom_range(0, 30)) @(negedge clk);
            wr(RA_MBRDY, 1);
            @(posedge clk iff mb_take);
          end
        end
        begin : watch
          forever begin
            @(posedge clk);
            if (go) begin
              logic [2:0] ev;
              for (int s = 0; s < 3; s++) ev[s] = (ticks >= s) && (ticks - s < n);
              chk(stage_valid == ev, $sformatf("valid pattern n=%0d tick=%0d", n, ticks));
              chk(pending[0] == 0 && pending[1] == 0 && pending[2] == 0, "tick before done");
              chk(mb_take == ev[0], "mb_take");
              ticks++;
            end
            if (mb_take) takes++;
            if (frame_done) break;
          end
        end
      join
      chk(ticks == n + 2, $sformatf("ticks %0d for %0d MBs", ticks, n));
      chk(takes == n, "MBs taken");
      @(negedge clk);
      chk(!busy, "idle after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
