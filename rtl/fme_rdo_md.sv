// fme_rdo_md: rate-distortion optimised decision over the 25 FME candidates,
// with the mode, reference and motion-vector cost terms.
// Candidate i (0..8: half PUs h = (hy+1)*3+(hx+1); 9..24: quarter PUs in the
// raster order of fme_qbilinear) has quarter-pel offset (dx,dy) from the
// centre MV. Its cost is
//   J = SATD + lambda * (se(mvx - mvpx) + se(mvy - mvpy) + ref_bits + mode_bits)
// with se() the length of the signed Exp-Golomb code. The candidate with the
// lowest J wins, the earliest index on ties. Also gives the cost of the centre
// candidate, used for the pre-skip test. Combinational.
// The Lagrangian form is the usual H.264 one; the exact cost terms are this
// design's choice.
module fme_rdo_md
  import enc_pkg::*;
(
  input  logic [19:0] distortion [25],
  input  qmv_t        center,
  input  qmv_t        mvp,
  input  logic [7:0]  lambda,
  input  logic [3:0]  ref_bits,
  input  logic [3:0]  mode_bits,
  output qmv_t        best_mv,
  output logic [21:0] best_cost,
  output logic [4:0]  best_idx,
  output logic [21:0] center_cost
);
  function automatic int off_x(input int i);
    int q;
    if (i < 9) return 2 * (i % 3) - 2;
    q = 0;
    for (int qy = -2; qy <= 2; qy++)
      for (int qx = -2; qx <= 2; qx++)
        if ((qx % 2 != 0) || (qy % 2 != 0)) begin
          if (q == i - 9) return qx;
          q++;
        end
    return 0;
  endfunction
  function automatic int off_y(input int i);
    int q;
    if (i < 9) return 2 * (i / 3) - 2;
    q = 0;
    for (int qy = -2; qy <= 2; qy++)
      for (int qx = -2; qx <= 2; qx++)
        if ((qx % 2 != 0) || (qy % 2 != 0)) begin
          if (q == i - 9) return qy;
          q++;
        end
    return 0;
  endfunction

  logic [21:0] cost [25];
  always_comb begin
    for (int i = 0; i < 25; i++) begin
      int mx, my, bits;
      mx = int'(center.x) + off_x(i);
      my = int'(center.y) + off_y(i);
      bits = se_bits(mx - int'(mvp.x)) + se_bits(my - int'(mvp.y)) + int'(ref_bits) + int'(mode_bits);
      cost[i] = 22'(distortion[i]) + 22'(int'(lambda) * bits);
    end
    best_idx  = 5'd4;
    best_cost = cost[4];
    for (int i = 0; i < 25; i++)
      if (cost[i] < best_cost || (cost[i] == best_cost && 5'(i) < best_idx)) begin
        best_cost = cost[i];
        best_idx  = 5'(i);
      end
    best_mv.x = 10'(int'(center.x) + off_x(int'(best_idx)));
    best_mv.y = 10'(int'(center.y) + off_y(int'(best_idx)));
    center_cost = cost[4];
  end
endmodule
