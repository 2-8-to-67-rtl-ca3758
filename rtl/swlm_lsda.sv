// swlm_lsda: search-window local memories with the ladder-shaped data arrangement.
//
// The search window of each reference frame is spread over 16 single-byte
// memories so that pixel (x, y) lives in memory (x + y) mod 16, at word
// y * (W/16) + x/16 of that frame's region. Sixteen horizontally adjacent pixels
// therefore sit in 16 different memories, and so do sixteen vertically adjacent
// ones: a whole row or a whole column of 16 reference pixels is read in one
// cycle. The bank mapping is the one printed in the memory map of the IME
// figure (A0,P1,O2.. in memory 0; B0,A1,P2.. in memory 1); the address layout,
// the write port and the second read port are this design's own choices.
//
// Interface
//   wr_*   : writes 16 pixels of one row, starting at an x that is a multiple of 16.
//   a_*    : IME port, reads 16 pixels of a row (a_col=0, pixels (x+i, y)) or a
//            column (a_col=1, pixels (x, y+i)), returned in order of i.
//   b_*    : FME port, reads a row of 16 pixels starting at (x, y).
// Timing: reads are synchronous, data is valid the cycle after the request.
// The second read port lets the fine-prediction stage read while the
// coarse-prediction stage searches; a chip would use duplicated or
// multi-ported macros for this.
module swlm_lsda
  import enc_pkg::*;
#(
  parameter int NREF = 2,
  parameter int W    = SW_W,
  parameter int H    = SW_H
) (
  input  logic               clk,
  // write port
  input  logic               wr_en,
  input  logic [$clog2(NREF)-1:0] wr_ref,
  input  logic [$clog2(W)-1:0]    wr_x,
  input  logic [$clog2(H)-1:0]    wr_y,
  input  pix_t               wr_data [16],
  // IME read port
  input  logic               a_en,
  input  logic               a_col,
  input  logic [$clog2(NREF)-1:0] a_ref,
  input  logic [$clog2(W)-1:0]    a_x,
  input  logic [$clog2(H)-1:0]    a_y,
  output pix_t               a_data [16],
  // FME read port (rows only)
  input  logic               b_en,
  input  logic [$clog2(NREF)-1:0] b_ref,
  input  logic [$clog2(W)-1:0]    b_x,
  input  logic [$clog2(H)-1:0]    b_y,
  output pix_t               b_data [16]
);
  localparam int G     = W / 16;
  localparam int DEPTH = NREF * H * G;
  localparam int AW    = $clog2(DEPTH);

  pix_t mem [16][DEPTH];

  logic [AW-1:0] a_addr [16];
  logic [AW-1:0] b_addr [16];
  logic [AW-1:0] w_addr [16];
  pix_t          a_q [16];
  pix_t          b_q [16];
  logic [3:0]    a_rot_q, b_rot_q;

  function automatic logic [AW-1:0] word(input int r, input int x, input int y);
    return AW'((r * H + y) * G + x / 16);
  endfunction

  // Per-bank addresses: which of the 16 requested pixels each bank holds.
  always_comb begin
    for (int b = 0; b < 16; b++) begin
      int i, ax, ay, bx, wx;
      i  = (b - int'(a_x) - int'(a_y)) & 15;
      ax = a_col ? int'(a_x) : int'(a_x) + i;
      ay = a_col ? int'(a_y) + i : int'(a_y);
      a_addr[b] = word(int'(a_ref), ax, ay);
      i  = (b - int'(b_x) - int'(b_y)) & 15;
      bx = int'(b_x) + i;
      b_addr[b] = word(int'(b_ref), bx, int'(b_y));
      i  = (b - int'(wr_x) - int'(wr_y)) & 15;
      wx = int'(wr_x) + i;
      w_addr[b] = word(int'(wr_ref), wx, int'(wr_y));
    end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < 16; b++) begin
      if (wr_en) mem[b][w_addr[b]] <= wr_data[(b - int'(wr_x) - int'(wr_y)) & 15];
      if (a_en)  a_q[b] <= mem[b][a_addr[b]];
      if (b_en)  b_q[b] <= mem[b][b_addr[b]];
    end
    if (a_en) a_rot_q <= 4'(a_x + a_y);
    if (b_en) b_rot_q <= 4'(b_x + b_y);
  end

  // Pixel i of the request came from bank (x + y + i) mod 16.
  always_comb begin
    for (int i = 0; i < 16; i++) begin
      a_data[i] = a_q[4'(a_rot_q + 4'(i))];
      b_data[i] = b_q[4'(b_rot_q + 4'(i))];
    end
  end
endmodule
