// fme_best_buf: best inter-mode information buffer with the Lagrangian mode
// decision over it.
// For each of the four partition modes (16x16, 16x8, 8x16, 8x8) it stores the
// refined quarter-pel MV and cost of each partition, written by the FME as it
// finishes them (wr_*). A mode counts once all its partitions are written.
// The decision picks the mode with the lowest sum of partition costs (the
// lowest mode number on ties) and gives its MVs as the best modes of the MB.
// clr empties the buffer at the start of an MB. Registered storage,
// combinational decision. best_mv[p] is the MV of partition p of the best
// mode (16x8: top, bottom; 8x16: left, right; 8x8: raster); the rest are unused. Buffer and decision are in the published FME architecture and the
// power-aware flow; the organisation is this design's choice.
module fme_best_buf
  import enc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic wr_en,
  input  pmode_e wr_mode,
  input  logic [1:0] wr_part,
  input  qmv_t wr_mv,
  input  logic [21:0] wr_cost,
  output logic   any_valid,
  output pmode_e best_mode,
  output qmv_t   best_mv [4],
  output logic [23:0] best_cost
);
  qmv_t        mv   [4][4];
  logic [21:0] cost [4][4];
  logic [3:0]  wr   [4];     // written partitions per mode

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < 4; m++) wr[m] <= '0;
    end else if (clr) begin
      for (int m = 0; m < 4; m++) wr[m] <= '0;
    end else if (wr_en && int'(wr_mode) < 4) begin
      wr[2'(wr_mode)][wr_part] <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (wr_en && int'(wr_mode) < 4) begin
      mv[2'(wr_mode)][wr_part]   <= wr_mv;
      cost[2'(wr_mode)][wr_part] <= wr_cost;
    end

  always_comb begin
    logic [23:0] tot;
    logic [3:0]  need;
    any_valid = 1'b0;
    best_mode = PM_16x16;
    best_cost = '1;
    for (int m = 0; m < 4; m++) begin
      need = (m == 0) ? 4'b0001 : (m == 3) ? 4'b1111 : 4'b0011;
      tot = '0;
      for (int p = 0; p < 4; p++)
        if (need[p]) tot += 24'(cost[m][p]);
      if ((wr[m] & need) == need && (!any_valid || tot < best_cost)) begin
        any_valid = 1'b1;
        best_cost = tot;
        best_mode = pmode_e'(m);
      end
    end
    for (int p = 0; p < 4; p++) best_mv[p] = mv[2'(best_mode)][p];
  end
endmodule
