// sad4x4: 4x4SAD vector datapath, the integer-pel matching criterion of motion estimation.
//
// Both operands are 4x4 blocks of 8-bit pixels packed into 128 bits, pixel (row r, column c)
// in byte 4*r+c. The unit subtracts the 16 pixel pairs, takes absolute values and sums them
// with a balanced adder tree. It is purely combinational, so the instruction completes in one
// clock cycle once its result is registered by the execution unit, as the architecture
// assumes for every vector instruction. The result needs 12 bits (16 * 255 = 4080) and is
// zero-extended to 32. Larger partitions (16x16 down to 8x4) are built in software by summing
// 4x4 results; the tree structure is this design's choice.
module sad4x4 (
  input  logic [127:0] blk_a,
  input  logic [127:0] blk_b,
  output logic [31:0]  sad
);
  logic [7:0]  ad [16];
  logic [11:0] sum;

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      logic [7:0] pa, pb;
      pa = blk_a[8*i +: 8];
      pb = blk_b[8*i +: 8];
      ad[i] = (pa > pb) ? pa - pb : pb - pa;
    end
    sum = '0;
    for (int i = 0; i < 16; i++) sum += 12'(ad[i]);
    sad = 32'(sum);
  end
endmodule
