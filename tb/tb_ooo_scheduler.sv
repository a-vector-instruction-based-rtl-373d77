// tb_ooo_scheduler: drives the decoder/scheduler with single instructions and chosen
// register-file, bus and station states, and checks the issue decision: target station,
// operands (value, pending tag, or value forwarded from the bus), destination rename,
// vector-unit choice and fallback, structural and branch stalls, branch targets and HALT.
module tb_ooo_scheduler;
  import vrisc_pkg::*;
  logic run = 1, head_valid = 1, pop, redirect, g_set_en, v_set_en, vec_pref = 0;
  logic halted, issued, issued_vec, stall, stall_branch, stall_struct;
  logic [9:0] head_pc = 10'd100, target;
  logic [31:0] head_instr, csr_val = 32'd777;
  logic [4:0] g_addr [3], g_set_reg;
  operand_t g_data [3], v_data [2];
  logic [3:0] v_addr [2], v_set_reg;
  logic [TAGW-1:0] set_tag, st_tag [4];
  cdb_t cdb;
  logic [1:0] csr_sel;
  logic [4:0] st_full, alloc;
  rs_req_t req;
  int checks = 0, failures = 0;

  ooo_scheduler #(.PCW(10)) dut (.*);

  // register file model: general register r holds 1000+r, pending on tag 5 if r is 7;
  // vector register v holds {4{v}}, pending on tag 8 if v is 3
  always_comb begin
    for (int p = 0; p < 3; p++)
      g_data[p] = (g_addr[p] == 5'd7) ? '{tag: 4'd5, val: '0} : '{tag: '0, val: VLEN'(1000 + g_addr[p])};
    for (int p = 0; p < 2; p++)
      v_data[p] = (v_addr[p] == 4'd3) ? '{tag: 4'd8, val: '0} : '{tag: '0, val: {4{28'd0, v_addr[p]}}};
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) st_tag[i] = 4'(1 + 3 * i);
    st_full = '0; cdb = '0;
    // ADD r4, r5, r6: both ready
    head_instr = enc_r(OP_ADD, 4, 5, 6); #1;
    chk("ADD to general unit", alloc == 5'b00001 && pop && issued && !issued_vec);
    chk("ADD operands", req.a == '{tag: '0, val: VLEN'(1005)} && req.b.val == VLEN'(1006));
    chk("ADD rename", g_set_en && g_set_reg == 4 && set_tag == 4'd1 && !v_set_en);
    // ADD r4, r7, r6: r7 pending on tag 5
    head_instr = enc_r(OP_ADD, 4, 7, 6); #1;
    chk("pending operand carries tag", req.a.tag == 4'd5 && pop);
    cdb = '{valid: 1'b1, tag: 4'd5, data: VLEN'(42)}; #1;
    chk("operand forwarded from bus", req.a == '{tag: '0, val: VLEN'(42)});
    cdb = '0;
    // ADDI
    head_instr = enc_i(OP_ADDI, 9, 5, -3); #1;
    chk("ADDI immediate", req.imm == 32'hFFFF_FFFD && alloc[0]);
    // MFC
    head_instr = enc_i(OP_MFC, 9, 0, 2); #1;
    chk("MFC reads control register", csr_sel == 2 && req.a.val == VLEN'(777) && alloc[0]);
    // SAD r2, v1, v3: v3 pending, vector unit 1 preferred
    head_instr = enc_r(OP_SAD, 2, 1, 3); #1;
    chk("SAD to vector unit 1", alloc == 5'b00010 && issued_vec && g_set_en && set_tag == 4'd4);
    chk("SAD operands", req.a.val == {4{32'd1}} && req.b.tag == 4'd8);
    vec_pref = 1; #1;
    chk("SAD to vector unit 2 when preferred", alloc == 5'b00100 && set_tag == 4'd7);
    st_full = 5'b00100; #1;
    chk("fallback to vector unit 1", alloc == 5'b00010);
    st_full = 5'b00110; #1;
    chk("both vector stations full: stall", !pop && stall_struct && stall && alloc == 0 && !g_set_en);
    st_full = '0; vec_pref = 0;
    // NAC v10, v8, v9
    head_instr = enc_r(OP_NAC, 10, 8, 9); #1;
    chk("NAC vector destination", v_set_en && v_set_reg == 10 && !g_set_en && alloc[1]);
    // LD4X4 v3, r20, r9
    head_instr = enc_r(OP_LD4X4, 3, 20, 9); #1;
    chk("4x4RD to load buffer", alloc == 5'b01000 && v_set_en && v_set_reg == 3 && set_tag == 4'd10
                                 && req.a.val == VLEN'(1020) && req.b.val == VLEN'(1009) && issued_vec);
    // SW r6, 8(r5)
    head_instr = enc_i(OP_SW, 6, 5, 8); #1;
    chk("SW to store buffer", alloc == 5'b10000 && !g_set_en && !v_set_en && req.b.val == VLEN'(1006)
                               && req.a.val == VLEN'(1005) && req.imm == 8);
    st_full = 5'b10000; #1;
    chk("store buffer full: stall", !pop && stall_struct);
    st_full = '0;
    // BEQ r5, r5 taken
    head_instr = enc_i(OP_BEQ, 5, 5, -10); #1;
    chk("BEQ taken", pop && redirect && target == 10'(100 + 1 - 10) && alloc == 0);
    head_instr = enc_i(OP_BNE, 5, 5, 20); #1;
    chk("BNE not taken", pop && !redirect);
    head_instr = enc_i(OP_BNE, 5, 6, 20); #1;
    chk("BNE taken", pop && redirect && target == 10'd121);
    head_instr = enc_i(OP_BEQ, 7, 5, 3); #1;
    chk("branch on pending register stalls", !pop && stall_branch && !redirect);
    cdb = '{valid: 1'b1, tag: 4'd5, data: VLEN'(1005)}; #1;
    chk("branch resolved by forwarded value", pop && redirect && target == 10'd104);
    cdb = '0;
    head_instr = enc_i(OP_JMP, 0, 0, 5); #1;
    chk("JMP", pop && redirect && target == 10'd106);
    head_instr = {OP_HALT, 26'd0}; #1;
    chk("HALT holds", halted && !pop && !stall);
    head_valid = 0; head_instr = enc_r(OP_ADD, 1, 2, 3); #1;
    chk("empty queue issues nothing", !pop && alloc == 0 && !stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
