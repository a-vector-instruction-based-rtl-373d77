// tb_vrisc_top: end-to-end test of the core at its default sizes.
//
// Loads a 16x16 original macroblock, a 32x32 reference picture and an 8x8 picture
// up-sampled 4x (32x32 quarter-pel plane) into the data SRAM, and a program that runs an
// integer-pel full search over 3x3 candidates in the style of a motion-estimation inner
// loop: for each 4x4 sub-block NAC computes both pointers, two 4x4RD loads fetch the blocks
// and 4x4SAD accumulates the cost. Each candidate's cost is stored and read back (SW then
// LW of the same word), then one quarter-pel candidate is evaluated with NAC2, 4x4RD2 and
// SATD. The testbench computes all costs itself and compares them with memory, checks the
// control-register instruction count against the program's dynamic length, and counts
// each mechanism (branch stall, full-station stall, load passing a store, load held by a
// store, taken branch, bus contention, both vector units used); one that never occurs is
// a failure.
module tb_vrisc_top;
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
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- data
  localparam int REF_BASE = 1024, RES_BASE = 512, UP_BASE = 2048;
  logic [7:0] orig [16][16];
  logic [7:0] refp [32][32];
  logic [7:0] up   [32][32];
  logic [7:0] mem  [4096];

  // ---------------------------------------------------------------- program
  logic [31:0] prog [$];
  function automatic void emit(logic [31:0] w); prog.push_back(w); endfunction
  function automatic int here(); return prog.size(); endfunction
  function automatic void br(op_e op, int ra, int rb, int lbl);
    emit(enc_i(op, ra, rb, lbl - (prog.size() + 1)));
  endfunction
  function automatic logic [31:0] vins(int vd, int rs, int lane);
    return {OP_VINS, 5'(vd), 5'(vd), 5'(rs), 9'd0, 2'(lane)};
  endfunction
  function automatic logic [31:0] vext(int rd, int vs, int lane);
    return {OP_VEXT, 5'(rd), 5'(vs), 14'd0, 2'(lane)};
  endfunction

  int n_init, n_sub_pre, n_x, n_y_head, n_y_tail, n_cx_head, n_cx_tail, n_cy_head, n_cy_tail;

  task automatic build_program();
    int lcy, lcx, ly, lx, p;
    emit(enc_i(OP_ADDI, 1, 0, 32));   // width
    emit(enc_i(OP_ADDI, 2, 0, 32));   // height
    emit(enc_i(OP_ADDI, 7, 0, 0));    // original base
    emit(enc_i(OP_ADDI, 8, 0, REF_BASE));
    emit(enc_i(OP_ADDI, 9, 0, 16));   // original pitch
    emit(enc_i(OP_ADDI, 13, 0, 16));  // block size
    emit(enc_i(OP_ADDI, 15, 0, 3));   // candidates per axis
    emit(enc_i(OP_ADDI, 16, 0, RES_BASE));
    emit(enc_i(OP_ADDI, 4, 0, 0));    // cand_y
    emit(vins(8, 1, 0)); emit(vins(8, 2, 1));
    emit(vins(9, 7, 2)); emit(vins(9, 8, 3));
    n_init = here();
    lcy = here();
    emit(enc_i(OP_ADDI, 3, 0, 0));    // cand_x
    n_cy_head = here() - lcy;
    lcx = here();
    emit(vins(8, 3, 2)); emit(vins(8, 4, 3));
    emit(enc_i(OP_ADDI, 10, 0, 0));   // cost
    emit(enc_i(OP_ADDI, 6, 0, 0));    // y
    n_cx_head = here() - lcx;
    ly = here();
    emit(enc_i(OP_ADDI, 5, 0, 0));    // x
    n_y_head = here() - ly;
    lx = here();
    emit(vins(9, 5, 0)); emit(vins(9, 6, 1));
    emit(enc_r(OP_NAC, 10, 8, 9));
    emit(vext(20, 10, 0)); emit(vext(21, 10, 1));
    emit(enc_r(OP_LD4X4, 3, 20, 9));
    emit(enc_r(OP_LD4X4, 4, 21, 1));
    emit(enc_r(OP_SAD, 22, 3, 4));
    emit(enc_r(OP_ADD, 10, 10, 22));
    emit(enc_i(OP_ADDI, 5, 5, 4));
    br(OP_BNE, 5, 13, lx);
    n_x = here() - lx;
    p = here();
    emit(enc_i(OP_ADDI, 6, 6, 4));
    br(OP_BNE, 6, 13, ly);
    n_y_tail = here() - p;
    p = here();
    emit(enc_i(OP_SW, 10, 16, 0));
    emit(enc_i(OP_LW, 24, 16, 0));
    emit(enc_r(OP_ADD, 25, 25, 24));
    emit(enc_i(OP_ADDI, 16, 16, 4));
    emit(enc_i(OP_ADDI, 3, 3, 1));
    br(OP_BNE, 3, 15, lcx);
    n_cx_tail = here() - p;
    p = here();
    emit(enc_i(OP_ADDI, 4, 4, 1));
    br(OP_BNE, 4, 15, lcy);
    n_cy_tail = here() - p;
    p = here();
    // one quarter-pel candidate (5, 3) in an 8x8 picture up-sampled 4x
    emit(enc_i(OP_ADDI, 26, 0, 8));
    emit(vins(11, 26, 0)); emit(vins(11, 26, 1));
    emit(enc_i(OP_ADDI, 27, 0, 5)); emit(vins(11, 27, 2));
    emit(enc_i(OP_ADDI, 27, 0, 3)); emit(vins(11, 27, 3));
    emit(vins(12, 0, 0)); emit(vins(12, 0, 1)); emit(vins(12, 7, 2));
    emit(enc_i(OP_ADDI, 28, 0, UP_BASE)); emit(vins(12, 28, 3));
    emit(enc_r(OP_NAC2, 13, 11, 12));
    emit(vext(20, 13, 0)); emit(vext(21, 13, 1));
    emit(enc_i(OP_ADDI, 29, 0, 128));
    emit(enc_r(OP_LD4X4, 5, 20, 9));
    emit(enc_r(OP_LD4X4_2, 6, 21, 29));
    emit(enc_r(OP_SATD, 30, 5, 6));
    emit(enc_i(OP_SW, 30, 16, 0));    // waits for SATD ...
    emit(enc_i(OP_LW, 23, 7, 4));     // ... while this load passes it
    emit(enc_i(OP_SW, 25, 16, 4));
    n_sub_pre = here() - p;
    emit(enc_i(OP_MFC, 31, 0, 1));
    emit(enc_i(OP_SW, 31, 16, 8));
    emit(enc_i(OP_SW, 23, 16, 12));
    emit({OP_HALT, 26'd0});
  endtask

  // ---------------------------------------------------------------- reference model
  function automatic int exp_sad(int cx, int cy);
    int s = 0;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        int d = int'(orig[y][x]) - int'(refp[cy + y][cx + x]);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  function automatic int exp_satd();
    int hm [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    int d [4][4], t [4][4];
    int s = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        d[r][c] = int'(orig[r][c]) - int'(up[3 + 4 * r][5 + 4 * c]);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += hm[i][k] * d[k][j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int v = 0;
        for (int k = 0; k < 4; k++) v += t[i][k] * hm[j][k];
        s += (v < 0) ? -v : v;
      end
    return s;
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

  // mechanism counters
  int ev_cnt [7];
  int veu2_used = 0, both_vec_busy = 0;
  always @(posedge clk) if (run && !done) begin
    for (int i = 0; i < 7; i++) if (events[i]) ev_cnt[i]++;
    if (dut.alloc[2]) veu2_used++;
    if (dut.u_veu1.req_valid && dut.u_veu2.req_valid) both_vec_busy++;
  end

  initial begin
    logic [31:0] v;
    int total, dyn, t0, t1;
    string ev_name [7] = '{"branch stall", "station-full stall", "load passed store",
                           "load held by store", "store", "taken branch", "bus contention"};
    for (int i = 0; i < 4096; i++) mem[i] = '0;
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++) begin
        refp[y][x] = 8'($urandom_range(0, 255));
        up[y][x]   = 8'($urandom_range(0, 255));
        mem[REF_BASE + 32 * y + x] = refp[y][x];
        mem[UP_BASE + 32 * y + x]  = up[y][x];
      end
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        orig[y][x] = 8'(int'(refp[y + 2][x + 1]) + $urandom_range(0, 6) - 3);
        mem[16 * y + x] = orig[y][x];
      end
    build_program();

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); host_iwr = 1'b1; host_iaddr = 10'(i); host_iwdata = prog[i];
    end
    for (int w = 0; w < 1024; w++) begin
      @(negedge clk); host_iwr = 1'b0; host_dwr = 1'b1; host_daddr = w;
      host_dwdata = {mem[4*w+3], mem[4*w+2], mem[4*w+1], mem[4*w]};
    end
    @(negedge clk); host_dwr = 1'b0;
    t0 = cyc;
    run = 1'b1;
    wait (done);
    t1 = cyc;
    @(negedge clk); run = 1'b0;

    total = 0;
    for (int cy = 0; cy < 3; cy++)
      for (int cx = 0; cx < 3; cx++) begin
        host_read(RES_BASE / 4 + 3 * cy + cx, v);
        check($sformatf("SAD cand (%0d,%0d)", cx, cy), v, exp_sad(cx, cy));
        total += exp_sad(cx, cy);
      end
    host_read(RES_BASE / 4 + 9, v);   check("SATD quarter-pel", v, exp_satd());
    host_read(RES_BASE / 4 + 10, v);  check("SAD checksum via LW", v, total);
    dyn = n_init + 3 * (n_cy_head + 3 * (n_cx_head + 4 * (n_y_head + 4 * n_x + n_y_tail)
          + n_cx_tail) + n_cy_tail) + n_sub_pre;
    host_read(RES_BASE / 4 + 11, v);  check("issued count at MFC", v, dyn);
    host_read(RES_BASE / 4 + 12, v);  check("LW ahead of store", v,
                                        {mem[7], mem[6], mem[5], mem[4]});
    check("cycle counter", counters[0], t1 - t0);
    check("issued instructions", counters[1], dyn + 3);   // MFC, two SW; HALT is never issued
    $display("cycles=%0d issued=%0d vector=%0d stall_cycles=%0d IPC=%.2f", counters[0],
             counters[1], counters[2], counters[3], real'(counters[1]) / real'(counters[0]));
    for (int i = 0; i < 7; i++) begin
      $display("  %s: %0d", ev_name[i], ev_cnt[i]);
      check(ev_name[i], ev_cnt[i] > 0, 1);
    end
    $display("  vector unit 2 allocations: %0d, both vector results pending: %0d",
             veu2_used, both_vec_busy);
    check("vector unit 2 used", veu2_used > 0, 1);
    check("both vector units active", both_vec_busy > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
