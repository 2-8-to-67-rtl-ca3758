// gated_clock_ctl: module-wise gated clock controller.
// One latch-based clock gate per gated domain: the IME engine, the FME engine
// and the coding-parameter register file, which is static and only needs a
// clock when the host writes it. Each enable comes from the controller that
// owns the domain: a domain is clocked only while its engine is started,
// busy or finishing, or while its register file is written.
// gate_cnt counts, per domain, the cycles whose clock edge was suppressed
// (for power accounting in simulation and for tests).
// The split into domains follows the system block diagram; the enable
// conditions are this design's.
module gated_clock_ctl #(
  parameter int N = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [N-1:0] en,
  output logic [N-1:0] gclk,
  output logic [31:0]  gate_cnt [N]
);
  for (genvar i = 0; i < N; i++) begin : g_gate
    clk_gate u_cg (.clk, .en(en[i]), .gclk(gclk[i]));
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)      gate_cnt[i] <= '0;
      else if (!en[i]) gate_cnt[i] <= gate_cnt[i] + 32'd1;
  end
endmodule
