// satd4x4: SATD vector datapath, the sub-pel matching criterion of motion estimation.
//
// The 16 pixel differences d = a - b (9-bit signed) of two 4x4 blocks are passed through a
// 4x4 Hadamard transform (H * D * H with the +/-1 order-4 Hadamard matrix, done as a row
// butterfly followed by a column butterfly), and the absolute values of the 16 coefficients
// are summed. Purely combinational: one cycle per instruction. The raw sum is returned
// (at most 16 * 4080 = 65280, 16 bits, zero-extended to 32); the halving some encoders
// apply is left to software. Pixel packing is as in sad4x4.
module satd4x4 (
  input  logic [127:0] blk_a,
  input  logic [127:0] blk_b,
  output logic [31:0]  satd
);
  typedef logic signed [13:0] coef_t;  // |coef| <= 16*255 fits 13 bits + sign
  coef_t d [4][4];
  coef_t t [4][4];
  coef_t h [4][4];
  logic [16:0] sum;

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        d[r][c] = coef_t'($signed({1'b0, blk_a[8*(4*r+c) +: 8]})) -
                  coef_t'($signed({1'b0, blk_b[8*(4*r+c) +: 8]}));
    // horizontal butterflies
    for (int r = 0; r < 4; r++) begin
      coef_t s0, s1, d0, d1;
      s0 = d[r][0] + d[r][3];  d0 = d[r][0] - d[r][3];
      s1 = d[r][1] + d[r][2];  d1 = d[r][1] - d[r][2];
      t[r][0] = s0 + s1;  t[r][2] = s0 - s1;
      t[r][1] = d0 + d1;  t[r][3] = d0 - d1;
    end
    // vertical butterflies
    for (int c = 0; c < 4; c++) begin
      coef_t s0, s1, d0, d1;
      s0 = t[0][c] + t[3][c];  d0 = t[0][c] - t[3][c];
      s1 = t[1][c] + t[2][c];  d1 = t[1][c] - t[2][c];
      h[0][c] = s0 + s1;  h[2][c] = s0 - s1;
      h[1][c] = d0 + d1;  h[3][c] = d0 - d1;
    end
    sum = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        sum += 17'($unsigned(h[r][c] < 0 ? coef_t'(-h[r][c]) : h[r][c]));
    satd = 32'(sum);
  end
endmodule
