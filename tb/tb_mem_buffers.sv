// tb_mem_buffers: the load/store buffers in front of a data SRAM, with the testbench
// playing scheduler and bus. Checks
//   * 4x4RD and 4x4RD2 gather the right 16 bytes at random (unaligned) addresses and
//     pitches, and a 4x4 load's result is ready 5 cycles after allocation (LW: 2);
//   * LW / SW values through memory;
//   * a load behind an older store to the same word waits until the store is written and
//     then sees the new value; a load behind an older store elsewhere goes ahead of it;
//   * a store whose data is still pending waits, and is written once the tag is broadcast;
//   * a store behind an older unread load does not overwrite what the load reads.
module tb_mem_buffers;
  import vrisc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic lb_alloc_valid = 0, sb_alloc_valid = 0, lb_full, sb_full, busy_any;
  rs_req_t lb_alloc_req, sb_alloc_req;
  logic [TAGW-1:0] lb_alloc_tag, req_tag;
  cdb_t cdb, ext;
  logic req_valid, grant;
  logic [VLEN-1:0] req_data;
  logic dc_rd_en, dc_wr_en, ev_ld_bypass, ev_ld_blocked, ev_st_done;
  logic [31:0] dc_rd_addr, dc_wr_addr, dc_wr_data;
  logic [127:0] dc_rd_data;
  logic host_wr = 0;
  logic [31:0] host_addr = '0, host_wdata = '0, host_rdata;
  logic [7:0] mem [4096];
  int checks = 0, failures = 0, n_bypass = 0, n_blocked = 0;

  mem_buffers dut (.*);
  dcache #(.NWORDS(1024)) u_mem (
    .clk, .rd_en(dc_rd_en), .rd_addr(dc_rd_addr), .rd_data(dc_rd_data), .wr_en(dc_wr_en),
    .wr_addr(dc_wr_addr), .wr_data(dc_wr_data), .host_wr, .host_rd(1'b0), .host_addr,
    .host_wdata, .host_rdata
  );
  always #5 clk = ~clk;
  assign grant = req_valid;
  always_comb cdb = req_valid ? '{valid: 1'b1, tag: req_tag, data: req_data} : ext;
  always @(posedge clk) begin n_bypass += ev_ld_bypass; n_blocked += ev_ld_blocked; end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  function automatic operand_t rdy(logic [31:0] v);
    return '{tag: '0, val: VLEN'(v)};
  endfunction

  task automatic alloc_load(op_e op, logic [31:0] base, logic [31:0] pitch, logic [31:0] imm,
                            output logic [TAGW-1:0] t);
    @(negedge clk);
    t = lb_alloc_tag;
    lb_alloc_valid = 1;
    lb_alloc_req = '{op: op, a: rdy(base), b: rdy(pitch), imm: imm};
    @(negedge clk); lb_alloc_valid = 0;
  endtask

  task automatic alloc_store(operand_t base, operand_t data, logic [31:0] imm);
    @(negedge clk);
    sb_alloc_valid = 1;
    sb_alloc_req = '{op: OP_SW, a: base, b: data, imm: imm};
    @(negedge clk); sb_alloc_valid = 0;
  endtask

  // wait for the result with tag t; lat = clock edges after the allocation edge
  task automatic wait_result(logic [TAGW-1:0] t, output logic [127:0] d, output int lat);
    lat = 0;
    while (!(req_valid && req_tag == t) && lat < 50) begin @(negedge clk); lat++; end
    d = req_data;
  endtask

  function automatic logic [127:0] gather(int base, int pitch, int step);
    logic [127:0] v;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) v[8*(4*r+c) +: 8] = mem[base + r * pitch + c * step];
    return v;
  endfunction

  function automatic logic [31:0] word_at(int a);
    return {mem[a+3], mem[a+2], mem[a+1], mem[a]};
  endfunction

  initial begin
    logic [TAGW-1:0] t, t2;
    logic [127:0] d;
    int lat;
    ext = '0; lb_alloc_req = '0; sb_alloc_req = '0;
    for (int i = 0; i < 4096; i++) mem[i] = 8'($urandom);
    #12 rst_n = 1;
    for (int w = 0; w < 1024; w++) begin
      @(negedge clk); host_wr = 1; host_addr = w; host_wdata = word_at(4 * w);
    end
    @(negedge clk); host_wr = 0;

    // 4x4RD / 4x4RD2 / LW
    for (int n = 0; n < 60; n++) begin
      int base, pitch, step;
      op_e op;
      op = (n % 3 == 0) ? OP_LD4X4 : (n % 3 == 1) ? OP_LD4X4_2 : OP_LW;
      step = (op == OP_LD4X4_2) ? 4 : 1;
      pitch = (op == OP_LD4X4_2) ? 4 * $urandom_range(16, 64) : $urandom_range(4, 176);
      base = $urandom_range(0, 4096 - 3 * pitch - 3 * step - 8);
      alloc_load(op, base, pitch, 0, t);
      wait_result(t, d, lat);
      if (op == OP_LW) begin
        chk("LW data", d == VLEN'(word_at(base)));
        chk($sformatf("LW latency %0d", lat), lat == 2);
      end else begin
        chk($sformatf("%s data", op.name()), d == gather(base, pitch, step));
        chk($sformatf("%s latency %0d", op.name(), lat), lat == 5);
      end
      @(negedge clk);
    end

    // store with pending data, then a load of the same word: load must wait
    alloc_store(rdy(32'd400), '{tag: 4'd3, val: '0}, 32'd4);
    alloc_load(OP_LW, 400, 0, 4, t);
    repeat (6) @(negedge clk);
    chk("load held by older store", !req_valid && n_blocked > 0);
    @(negedge clk); ext = '{valid: 1'b1, tag: 4'd3, data: VLEN'(32'hCAFE_F00D)};
    @(negedge clk); ext = '0;
    mem[404] = 8'h0D; mem[405] = 8'hF0; mem[406] = 8'hFE; mem[407] = 8'hCA;
    wait_result(t, d, lat);
    chk("load after store sees stored data", d == VLEN'(32'hCAFE_F00D));
    @(negedge clk);

    // store with pending data, then a load elsewhere: the load goes first
    alloc_store(rdy(32'd800), '{tag: 4'd2, val: '0}, 32'd0);
    alloc_load(OP_LD4X4, 1000, 16, 0, t);
    wait_result(t, d, lat);
    chk("load passed older store", d == gather(1000, 16, 1) && n_bypass > 0 && busy_any);
    @(negedge clk);
    // a younger store to the block the next load reads must not overtake it
    alloc_load(OP_LD4X4, 2000, 32, 0, t2);
    alloc_store(rdy(32'd2000), rdy(32'h1234_5678), 32'd0);
    wait_result(t2, d, lat);
    chk("older load not overwritten by younger store", d == gather(2000, 32, 1));
    @(negedge clk);
    @(negedge clk); ext = '{valid: 1'b1, tag: 4'd2, data: VLEN'(32'h0BAD_BEEF)};
    @(negedge clk); ext = '0;
    repeat (3) @(negedge clk);
    mem[800] = 8'hEF; mem[801] = 8'hBE; mem[802] = 8'hAD; mem[803] = 8'h0B;
    mem[2000] = 8'h78; mem[2001] = 8'h56; mem[2002] = 8'h34; mem[2003] = 8'h12;
    alloc_load(OP_LW, 800, 0, 0, t);
    wait_result(t, d, lat);
    chk("store written after its data arrived", d == VLEN'(32'h0BAD_BEEF));
    @(negedge clk);
    alloc_load(OP_LW, 2000, 0, 0, t);
    wait_result(t, d, lat);
    chk("younger store written after the load", d == VLEN'(32'h1234_5678));
    repeat (3) @(negedge clk);
    chk("buffers drained", !busy_any);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
