// tb_me_full_search: motion estimation of one 16x16 macroblock as the evaluated workload
// does it, run on the core at its default sizes: an integer-pel full search over a +/-16
// pel range with SAD as the cost, then a quarter-pel refinement around the integer result
// with SATD as the cost.
// The data memory holds the 48x48 search window of one reference frame, the current
// macroblock, and a 4x up-sampled copy (80x80 samples) of the 20x20-pel part of the window
// around the expected match. The up-sampling is bilinear and done by the testbench: the
// core only reads the up-sampled plane, so the interpolation filter is not part of the
// hardware. The macroblock is taken from the up-sampled plane at a displacement of
// (+5 1/4, -7 1/4) pels, with small noise added.
// Phase 1 evaluates all 33x33 integer candidates with the NAC / 4x4RD / 4x4SAD inner loop
// and keeps the minimum with SLT and a branch. Phase 2 starts from the vector phase 1
// found and evaluates the 7x7 quarter-pel candidates within +/-3/4 pel with the NAC2 /
// 4x4RD2 / SATD inner loop. Both results are stored. The testbench repeats both searches
// in software, compares costs and vectors, and reports cycles and IPC from the control
// registers.
module tb_me_full_search;
  import vrisc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic        host_iwr = 1'b0, host_dwr = 1'b0, host_drd = 1'b0;
  logic [9:0]  host_iaddr = '0;
  logic [31:0] host_iwdata = '0, host_daddr = '0, host_dwdata = '0, host_drdata;
  logic        done;
  logic [31:0] counters [4];
  logic [4:0]  dbg_greg = '0;
  logic [31:0] dbg_gval;
  logic [3:0]  dbg_vreg = '0;
  logic [127:0] dbg_vval;
  logic [6:0]  events;

  vrisc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #100_000_000;   // 10 M cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int WIN = 48, REF_BASE = 1024, RES_BASE = 512, RANGE = 16;
  // up-sampled part of the window: integer pels X0.. X0+SUB-1, Y0 .. Y0+SUB-1
  localparam int SUB = 20, X0 = 19, Y0 = 7, UP_BASE = 4096, UPW = 4 * SUB;
  localparam int MEM_BYTES = 16384;
  logic [7:0] orig [16][16];
  logic [7:0] win  [WIN][WIN];
  logic [7:0] up   [UPW][UPW];
  logic [7:0] mem  [MEM_BYTES];

  logic [31:0] prog [$];
  function automatic void emit(logic [31:0] w); prog.push_back(w); endfunction
  function automatic void br(op_e op, int ra, int rb, int lbl);
    emit(enc_i(op, ra, rb, lbl - (prog.size() + 1)));
  endfunction
  function automatic logic [31:0] vins(int vd, int rs, int lane);
    return {OP_VINS, 5'(vd), 5'(vd), 5'(rs), 9'd0, 2'(lane)};
  endfunction
  function automatic logic [31:0] vext(int rd, int vs, int lane);
    return {OP_VEXT, 5'(rd), 5'(vs), 14'd0, 2'(lane)};
  endfunction

  task automatic build_program();
    int lcy, lcx, ly, lx, skip_at;
    emit(enc_i(OP_ADDI, 1, 0, WIN));        // width
    emit(enc_i(OP_ADDI, 2, 0, WIN));        // height
    emit(enc_i(OP_ADDI, 8, 0, REF_BASE));
    emit(enc_i(OP_ADDI, 9, 0, 16));         // original pitch, block size
    emit(enc_i(OP_ADDI, 15, 0, 2 * RANGE + 1));
    emit(enc_i(OP_LUI, 11, 0, 16'h7FFF));   // best cost = large
    emit(enc_i(OP_ADDI, 4, 0, 0));          // cand_y
    emit(vins(8, 1, 0)); emit(vins(8, 2, 1));
    emit(vins(9, 0, 2)); emit(vins(9, 8, 3));
    lcy = prog.size();
    emit(enc_i(OP_ADDI, 3, 0, 0));          // cand_x
    lcx = prog.size();
    emit(vins(8, 3, 2)); emit(vins(8, 4, 3));
    emit(enc_i(OP_ADDI, 10, 0, 0));
    emit(enc_i(OP_ADDI, 6, 0, 0));
    ly = prog.size();
    emit(enc_i(OP_ADDI, 5, 0, 0));
    lx = prog.size();
    emit(vins(9, 5, 0)); emit(vins(9, 6, 1));
    emit(enc_r(OP_NAC, 10, 8, 9));
    emit(vext(20, 10, 0)); emit(vext(21, 10, 1));
    emit(enc_r(OP_LD4X4, 3, 20, 9));
    emit(enc_r(OP_LD4X4, 4, 21, 1));
    emit(enc_r(OP_SAD, 22, 3, 4));
    emit(enc_r(OP_ADD, 10, 10, 22));
    emit(enc_i(OP_ADDI, 5, 5, 4));
    br(OP_BNE, 5, 9, lx);
    emit(enc_i(OP_ADDI, 6, 6, 4));
    br(OP_BNE, 6, 9, ly);
    // keep the minimum: if (cost < best) {best = cost; bx = cx; by = cy;}
    emit(enc_r(OP_SLT, 14, 10, 11));
    skip_at = prog.size();
    emit(enc_i(OP_BEQ, 14, 0, 3));
    emit(enc_r(OP_ADD, 11, 10, 0));
    emit(enc_r(OP_ADD, 12, 3, 0));
    emit(enc_r(OP_ADD, 13, 4, 0));
    emit(enc_i(OP_ADDI, 3, 3, 1));
    br(OP_BNE, 3, 15, lcx);
    emit(enc_i(OP_ADDI, 4, 4, 1));
    br(OP_BNE, 4, 15, lcy);
    emit(enc_i(OP_SW, 11, 0, RES_BASE));
    emit(enc_i(OP_SW, 12, 0, RES_BASE + 4));
    emit(enc_i(OP_SW, 13, 0, RES_BASE + 8));
    // ---- phase 2: quarter-pel refinement around (r12, r13)
    emit(enc_i(OP_ADDI, 30, 0, SUB));
    emit(vins(11, 30, 0)); emit(vins(11, 30, 1));      // up-sampled part is SUB x SUB pels
    emit(vins(12, 0, 2));                              // original block at 0
    emit(enc_i(OP_ADDI, 30, 0, UP_BASE)); emit(vins(12, 30, 3));
    emit(enc_i(OP_ADDI, 29, 0, 4 * UPW));              // 4x4RD2 row step: 4 sample rows
    emit(enc_i(OP_ADDI, 30, 12, -X0));                 // first column 4*(bx-X0) - 3
    emit(enc_r(OP_ADD, 30, 30, 30)); emit(enc_r(OP_ADD, 30, 30, 30));
    emit(enc_i(OP_ADDI, 16, 30, -3));
    emit(enc_i(OP_ADDI, 30, 13, -Y0));                 // first row 4*(by-Y0) - 3
    emit(enc_r(OP_ADD, 30, 30, 30)); emit(enc_r(OP_ADD, 30, 30, 30));
    emit(enc_i(OP_ADDI, 17, 30, -3));
    emit(enc_i(OP_ADDI, 27, 16, 7));
    emit(enc_i(OP_ADDI, 28, 17, 7));
    emit(enc_i(OP_LUI, 24, 0, 16'h7FFF));
    emit(enc_r(OP_ADD, 19, 17, 0));
    lcy = prog.size();
    emit(enc_r(OP_ADD, 18, 16, 0));
    lcx = prog.size();
    emit(vins(11, 18, 2)); emit(vins(11, 19, 3));
    emit(enc_i(OP_ADDI, 23, 0, 0));
    emit(enc_i(OP_ADDI, 6, 0, 0));
    ly = prog.size();
    emit(enc_i(OP_ADDI, 5, 0, 0));
    lx = prog.size();
    emit(vins(12, 5, 0)); emit(vins(12, 6, 1));
    emit(enc_r(OP_NAC2, 13, 11, 12));
    emit(vext(20, 13, 0)); emit(vext(21, 13, 1));
    emit(enc_r(OP_LD4X4, 5, 20, 9));
    emit(enc_r(OP_LD4X4_2, 6, 21, 29));
    emit(enc_r(OP_SATD, 22, 5, 6));
    emit(enc_r(OP_ADD, 23, 23, 22));
    emit(enc_i(OP_ADDI, 5, 5, 4));
    br(OP_BNE, 5, 9, lx);
    emit(enc_i(OP_ADDI, 6, 6, 4));
    br(OP_BNE, 6, 9, ly);
    emit(enc_r(OP_SLT, 31, 23, 24));
    emit(enc_i(OP_BEQ, 31, 0, 3));
    emit(enc_r(OP_ADD, 24, 23, 0));
    emit(enc_r(OP_ADD, 25, 18, 0));
    emit(enc_r(OP_ADD, 26, 19, 0));
    emit(enc_i(OP_ADDI, 18, 18, 1));
    br(OP_BNE, 18, 27, lcx);
    emit(enc_i(OP_ADDI, 19, 19, 1));
    br(OP_BNE, 19, 28, lcy);
    emit(enc_i(OP_SW, 24, 0, RES_BASE + 12));
    emit(enc_i(OP_SW, 25, 0, RES_BASE + 16));
    emit(enc_i(OP_SW, 26, 0, RES_BASE + 20));
    emit({OP_HALT, 26'd0});
  endtask

  // SATD of the 4x4 block at (bx, by) of the macroblock against up[qy + 4r][qx + 4c]:
  // sum of |H D H^T| with H the 4x4 Hadamard matrix, without scaling
  function automatic int satd_blk(int bx, int by, int qx, int qy);
    int hm [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    int d [4][4], t [4][4];
    int s = 0, v;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        d[r][c] = int'(orig[by + r][bx + c]) - int'(up[qy + 4 * r][qx + 4 * c]);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += hm[i][k] * d[k][j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        v = 0;
        for (int k = 0; k < 4; k++) v += t[i][k] * hm[j][k];
        s += (v < 0) ? -v : v;
      end
    return s;
  endfunction

  // bilinear quarter-pel sample of the window at (4*Y0 + qy, 4*X0 + qx) quarter pels
  function automatic logic [7:0] interp(int qx, int qy);
    int ix, iy, fx, fy, a, b, c, d;
    ix = X0 + qx / 4;  iy = Y0 + qy / 4;  fx = qx % 4;  fy = qy % 4;
    a = win[iy][ix];      b = win[iy][ix + 1];
    c = win[iy + 1][ix];  d = win[iy + 1][ix + 1];
    return 8'(((4 - fx) * (4 - fy) * a + fx * (4 - fy) * b + (4 - fx) * fy * c
               + fx * fy * d + 8) / 16);
  endfunction

  task automatic host_read(input int word, output logic [31:0] v);
    @(negedge clk); host_drd = 1'b1; host_daddr = word;
    @(negedge clk); host_drd = 1'b0; v = host_drdata;
  endtask

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] v;
    int best, bx, by, p, s, d, qbest, qbx, qby, qx0, qy0;
    for (int i = 0; i < MEM_BYTES; i++) mem[i] = '0;
    for (int y = 0; y < WIN; y++)
      for (int x = 0; x < WIN; x++) begin
        win[y][x] = 8'($urandom_range(0, 255));
        mem[REF_BASE + WIN * y + x] = win[y][x];
      end
    for (int qy = 0; qy < UPW; qy++)
      for (int qx = 0; qx < UPW; qx++) begin
        up[qy][qx] = interp(qx, qy);
        mem[UP_BASE + UPW * qy + qx] = up[qy][qx];
      end
    // macroblock at displacement (+5 1/4, -7 1/4) pels from the window centre (16, 16):
    // window column 21 1/4 + x is up column 4*(21-X0) + 1 + 4x, row 8 3/4 + y is up row
    // 4*(8-Y0) + 3 + 4y
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        p = int'(up[4 * (8 - Y0) + 3 + 4 * y][4 * (21 - X0) + 1 + 4 * x])
            + int'($urandom_range(0, 4)) - 2;
        orig[y][x] = 8'(p < 0 ? 0 : p > 255 ? 255 : p);
        mem[16 * y + x] = orig[y][x];
      end
    best = 32'h7FFF_FFFF; bx = 0; by = 0;
    for (int cy = 0; cy <= 2 * RANGE; cy++)
      for (int cx = 0; cx <= 2 * RANGE; cx++) begin
        s = 0;
        for (int y = 0; y < 16; y++)
          for (int x = 0; x < 16; x++) begin
            d = int'(orig[y][x]) - int'(win[cy + y][cx + x]);
            s += d < 0 ? -d : d;
          end
        if (s < best) begin best = s; bx = cx; by = cy; end
      end
    qx0 = 4 * (bx - X0) - 3;  qy0 = 4 * (by - Y0) - 3;
    qbest = 32'h7FFF_FFFF; qbx = 0; qby = 0;
    for (int qy = qy0; qy < qy0 + 7; qy++)
      for (int qx = qx0; qx < qx0 + 7; qx++) begin
        s = 0;
        for (int y = 0; y < 16; y += 4)
          for (int x = 0; x < 16; x += 4) s += satd_blk(x, y, qx + 4 * x, qy + 4 * y);
        if (s < qbest) begin qbest = s; qbx = qx; qby = qy; end
      end
    build_program();

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); host_iwr = 1'b1; host_iaddr = 10'(i); host_iwdata = prog[i];
    end
    for (int w = 0; w < MEM_BYTES / 4; w++) begin
      @(negedge clk); host_iwr = 1'b0; host_dwr = 1'b1; host_daddr = w;
      host_dwdata = {mem[4*w+3], mem[4*w+2], mem[4*w+1], mem[4*w]};
    end
    @(negedge clk); host_dwr = 1'b0;
    run = 1'b1;
    wait (done);
    @(negedge clk); run = 1'b0;

    host_read(RES_BASE / 4, v);     check("best SAD", v, best);
    host_read(RES_BASE / 4 + 1, v); check("best cand_x", v, bx);
    host_read(RES_BASE / 4 + 2, v); check("best cand_y", v, by);
    check("motion vector x", bx - RANGE, 5);
    check("motion vector y", by - RANGE, -7);
    host_read(RES_BASE / 4 + 3, v); check("best SATD", v, qbest);
    host_read(RES_BASE / 4 + 4, v); check("best quarter-pel column", v, qbx);
    host_read(RES_BASE / 4 + 5, v); check("best quarter-pel row", v, qby);
    // quarter-pel vector relative to the window centre
    check("quarter-pel vector x", qbx + 4 * X0 - 4 * RANGE, 21);
    check("quarter-pel vector y", qby + 4 * Y0 - 4 * RANGE, -29);
    $display("integer search: best SAD %0d at (%0d,%0d); quarter-pel: best SATD %0d at (%0d,%0d)/4",
             best, bx - RANGE, by - RANGE, qbest, qbx + 4 * X0 - 4 * RANGE,
             qby + 4 * Y0 - 4 * RANGE);
    $display("cycles=%0d issued=%0d vector=%0d IPC=%.2f",
             counters[0], counters[1], counters[2], real'(counters[1]) / real'(counters[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
