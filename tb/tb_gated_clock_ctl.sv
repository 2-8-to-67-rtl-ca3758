// tb_gated_clock_ctl: each gated clock must pulse exactly on the rising
// edges whose enable was high before the edge, with no glitch when the
// enable changes while the clock is high; the suppressed-edge counters must
// match.
module tb_gated_clock_ctl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0] en = '0;
  logic [2:0] gclk;
  logic [31:0] gate_cnt [3];
  int edges [3];
  int expected [3];
  int off [3];
  gated_clock_ctl #(.N(3)) dut (.clk, .rst_n, .en, .gclk, .gate_cnt);
  always #5 clk = ~clk;
  for (genvar i = 0; i < 3; i++) begin : g_cnt
    always @(posedge gclk[i]) edges[i]++;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    edges = '{0, 0, 0};
    expected = '{0, 0, 0};
    off = '{0, 0, 0};
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      en = 3'($urandom);
      for (int i = 0; i < 3; i++) if (en[i]) expected[i]++; else off[i]++;
      @(posedge clk);
      // change the enables while clk is high: must not create an edge
      #2 en = 3'($urandom);
      @(negedge clk);
    end
    #1;
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (edges[i] != expected[i]) begin
        failures++;
        $display("gate %0d: %0d edges, expected %0d", i, edges[i], expected[i]);
      end
      if (int'(gate_cnt[i]) != off[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
