// ime_best_info: the 41 best-information registers of the IME engine.
// For every variable-size block it keeps the lowest matching cost seen so far
// and the motion vector that gave it. On each cycle with upd=1 the cost of
// block k is sad[k] + mv_cost (the motion-vector rate term, the same for all
// blocks of one candidate) and replaces the stored one if it is strictly
// lower, so the first of equal costs wins. clr sets all costs to the maximum.
// The registers are from the published IME architecture; the cost formula is this design's.
module ime_best_info
  import enc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  logic  upd,
  input  sad_t  sad [NUM_VBS],
  input  cost_t mv_cost,
  input  imv_t  mv,
  output cost_t best_cost [NUM_VBS],
  output imv_t  best_mv   [NUM_VBS]
);
  // candidate cost of each block at the current point
  cost_t c [NUM_VBS];
  always_comb
    for (int k = 0; k < NUM_VBS; k++) c[k] = cost_t'(sad[k]) + mv_cost;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_VBS; k++) begin
        best_cost[k] <= '1;
        best_mv[k]   <= '0;
      end
    end else if (clr) begin
      for (int k = 0; k < NUM_VBS; k++) begin
        best_cost[k] <= '1;
        best_mv[k]   <= '0;
      end
    end else if (upd) begin
      for (int k = 0; k < NUM_VBS; k++) begin
        if (c[k] < best_cost[k]) begin
          best_cost[k] <= c[k];
          best_mv[k]   <= mv;
        end
      end
    end
  end
endmodule
