// ooo_scheduler: General & Primitive Instruction Decoder and Out-of-Order Scheduler.
//
// Takes the instruction at the head of the instruction queue, decodes it and, in program
// order, issues at most one instruction per cycle into the reservation station or buffer
// that executes it (Tomasulo issue). Source operands are read from the general and vector
// register files: a register whose producer is still pending yields that producer's tag
// instead of a value, and a value being broadcast on the common data bus in the same cycle
// is forwarded. The destination register is then renamed to the tag of the allocated entry,
// which removes write-after-read and write-after-write hazards; instructions then execute
// as soon as their operands arrive, in any order.
//   * Scalar ALU ops and MFC go to the general unit; SAD, SATD, NAC, NAC2, VINS and VEXT to
//     one of the two vector units (alternating, falling back to whichever has room);
//     LW, LD4X4 (4x4RD) and LD4X4_2 (4x4RD2) to the load buffers; SW to the store buffers.
//   * Issue stalls while the target station is full (structural stall).
//   * BEQ / BNE / JMP are resolved here: a branch waits at the head until both compared
//     registers hold values (branch stall), then a taken branch redirects fetch to
//     pc + 1 + imm and flushes the queue. There is no speculation, so no recovery is needed.
//   * HALT stays at the head and stops issue; the core is done when all stations are empty.
// The issue width, the branch handling and the unit selection are this design's choices.
module ooo_scheduler
  import vrisc_pkg::*;
#(
  parameter int PCW = 10
) (
  input  logic            run,
  input  logic            head_valid,
  input  logic [PCW-1:0]  head_pc,
  input  logic [31:0]     head_instr,
  output logic            pop,
  output logic            redirect,
  output logic [PCW-1:0]  target,
  // register files
  output logic [4:0]      g_addr [3],
  input  operand_t        g_data [3],
  output logic [3:0]      v_addr [2],
  input  operand_t        v_data [2],
  output logic            g_set_en,
  output logic [4:0]      g_set_reg,
  output logic            v_set_en,
  output logic [3:0]      v_set_reg,
  output logic [TAGW-1:0] set_tag,
  input  cdb_t            cdb,
  // control registers
  output logic [1:0]      csr_sel,
  input  logic [31:0]     csr_val,
  // stations: 0 general, 1 vector 1, 2 vector 2, 3 load buffer, 4 store buffer
  input  logic [4:0]      st_full,
  input  logic [TAGW-1:0] st_tag [4],
  output logic [4:0]      alloc,
  output rs_req_t         req,
  input  logic            vec_pref,      // vector unit preferred for the next vector op
  // status and events
  output logic            halted,
  output logic            issued,
  output logic            issued_vec,
  output logic            stall,
  output logic            stall_branch,
  output logic            stall_struct
);
  op_e op;
  logic [4:0] rd, rs1, rs2;
  logic [31:0] simm;
  operand_t ga, gb, gd, va, vb, zero;
  int unsigned unit;         // 0..4, 5 = no station (branch, nop, halt)
  logic g_dest, v_dest, is_branch, br_ready, br_taken;

  function automatic operand_t fwd(operand_t o, cdb_t c);
    operand_t r;
    r = o;
    if (o.tag != '0 && c.valid && c.tag == o.tag) begin
      r.tag = '0;
      r.val = c.data;
    end
    return r;
  endfunction

  always_comb begin
    op   = f_op(head_instr);
    rd   = f_rd(head_instr);
    rs1  = f_rs1(head_instr);
    rs2  = f_rs2(head_instr);
    simm = f_simm(head_instr);
    g_addr[0] = rs1;  g_addr[1] = rs2;  g_addr[2] = rd;
    v_addr[0] = rs1[3:0];  v_addr[1] = rs2[3:0];
    ga = fwd(g_data[0], cdb);  gb = fwd(g_data[1], cdb);  gd = fwd(g_data[2], cdb);
    va = fwd(v_data[0], cdb);  vb = fwd(v_data[1], cdb);
    zero = '0;
    csr_sel = head_instr[1:0];

    unit = 5;  g_dest = 1'b0;  v_dest = 1'b0;  is_branch = 1'b0;
    req = '{op: op, a: zero, b: zero, imm: simm};
    unique case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL: begin
        unit = 0; g_dest = 1'b1; req.a = ga; req.b = gb;
      end
      OP_ADDI, OP_LUI: begin unit = 0; g_dest = 1'b1; req.a = ga; end
      OP_MFC: begin
        unit = 0; g_dest = 1'b1;
        req.a = '{tag: '0, val: VLEN'(csr_val)};
      end
      OP_LW:  begin unit = 3; g_dest = 1'b1; req.a = ga; end
      OP_LD4X4, OP_LD4X4_2: begin
        unit = 3; v_dest = 1'b1; req.a = ga; req.b = gb; req.imm = '0;
      end
      OP_SW:  begin unit = 4; req.a = ga; req.b = gd; end
      OP_SAD, OP_SATD: begin unit = 1; g_dest = 1'b1; req.a = va; req.b = vb; end
      OP_NAC, OP_NAC2: begin unit = 1; v_dest = 1'b1; req.a = va; req.b = vb; end
      OP_VINS: begin unit = 1; v_dest = 1'b1; req.a = va; req.b = gb; end
      OP_VEXT: begin unit = 1; g_dest = 1'b1; req.a = va; end
      OP_BEQ, OP_BNE, OP_JMP: is_branch = 1'b1;
      default: ;
    endcase

    // choose a vector unit
    if (unit == 1) begin
      if (!vec_pref) unit = !st_full[1] ? 1 : 2;
      else           unit = !st_full[2] ? 2 : 1;
    end

    br_ready = (op == OP_JMP) || (gd.tag == '0 && ga.tag == '0);
    br_taken = (op == OP_JMP) ||
               ((gd.val[31:0] == ga.val[31:0]) ^ (op == OP_BNE));

    halted = run && head_valid && op == OP_HALT;
    stall_branch = run && head_valid && is_branch && !br_ready;
    stall_struct = run && head_valid && unit < 5 && st_full[unit];
    stall  = stall_branch || stall_struct;
    pop    = run && head_valid && !halted && !stall;
    issued = pop;
    issued_vec = pop && (vec_op(op) || op == OP_LD4X4 || op == OP_LD4X4_2);

    redirect = pop && is_branch && br_taken;
    target   = head_pc + PCW'(1) + PCW'(simm);

    alloc = '0;
    if (pop && unit < 5) alloc[unit] = 1'b1;
    set_tag   = (unit < 4) ? st_tag[unit[1:0]] : '0;
    g_set_en  = pop && g_dest;
    g_set_reg = rd;
    v_set_en  = pop && v_dest;
    v_set_reg = rd[3:0];
  end
endmodule
