// nac_unit: NAC / NAC2 next-address calculation for the motion-estimation block loop.
//
// For the 4x4 sub-block at offset (x, y) inside the current block and a search candidate
// (cand_x, cand_y), it computes in one combinational step the byte pointers into the
// original block buffer and into the reference picture, replacing the address arithmetic
// the search loop would otherwise run as scalar code.
//   Operand a lanes (32 bit each): 0 img_width, 1 img_height, 2 cand_x, 3 cand_y (signed)
//   Operand b lanes:               0 x, 1 y, 2 orig_base, 3 ref_base
//   Result lanes:                  0 pOrig, 1 pRef, 2 x + 4, 3 y
// pOrig = orig_base + 16*y + x (the original macroblock is kept as a 16-byte-pitch buffer).
// NAC  (integer pel): column X = cand_x + x, row Y = cand_y + y, clamped to
//      [0, width-4] x [0, height-4]; pRef = ref_base + Y*width + X.
// NAC2 (quarter pel): cand_x/cand_y are quarter-pel positions in the 4x up-sampled reference
//      plane of pitch 4*width; X = cand_x + 4x, Y = cand_y + 4y, clamped to
//      [0, 4*width-13] x [0, 4*height-13] (a sub-pel 4x4 block spans 13 samples);
//      pRef = ref_base + Y*4*width + X.
// The lane assignment, the clamping and lanes 2-3 of the result are this design's choices.
module nac_unit (
  input  logic         sub_pel,   // 0: NAC, 1: NAC2
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic [127:0] y_out
);
  logic signed [31:0] width, height, cx, cy, x, y, ox, oy, maxx, maxy, pitch;
  logic        [31:0] orig_base, ref_base;

  always_comb begin
    width  = a[31:0];   height = a[63:32];
    cx     = a[95:64];  cy     = a[127:96];
    x      = b[31:0];   y      = b[63:32];
    orig_base = b[95:64];  ref_base = b[127:96];
    if (sub_pel) begin
      ox = cx + (x <<< 2);  oy = cy + (y <<< 2);
      maxx = (width <<< 2) - 13;  maxy = (height <<< 2) - 13;
      pitch = width <<< 2;
    end else begin
      ox = cx + x;  oy = cy + y;
      maxx = width - 4;  maxy = height - 4;
      pitch = width;
    end
    if (ox < 0) ox = 0; else if (ox > maxx) ox = maxx;
    if (oy < 0) oy = 0; else if (oy > maxy) oy = maxy;
    y_out[31:0]   = orig_base + 32'(y <<< 4) + 32'(x);
    y_out[63:32]  = ref_base + 32'(oy * pitch) + 32'(ox);
    y_out[95:64]  = 32'(x + 4);
    y_out[127:96] = 32'(y);
  end
endmodule
