// ime_sub_tree: 4x4 sub-adder tree. Adds the 16 absolute differences of one
// 4x4 block into its SAD with a balanced tree of 15 adders (combinational).
// Sixteen of these feed the variable-block-size tree, as in the published IME architecture.
module ime_sub_tree (
  input  logic [7:0]  ad [16],
  output logic [11:0] sad
);
  logic [8:0]  s1 [8];
  logic [9:0]  s2 [4];
  logic [10:0] s3 [2];
  always_comb begin
    for (int i = 0; i < 8; i++) s1[i] = 9'(ad[2*i]) + 9'(ad[2*i+1]);
    for (int i = 0; i < 4; i++) s2[i] = 10'(s1[2*i]) + 10'(s1[2*i+1]);
    for (int i = 0; i < 2; i++) s3[i] = 11'(s2[2*i]) + 11'(s2[2*i+1]);
    sad = 12'(s3[0]) + 12'(s3[1]);
  end
endmodule
