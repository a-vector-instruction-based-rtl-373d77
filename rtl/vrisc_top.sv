// vrisc_top: out-of-order RISC core with motion-estimation vector instructions.
//
// Fetch: the instruction memory controller reads the L1 I-cache into the instruction queue.
// Issue: the decoder / out-of-order scheduler takes the queue head in program order, reads
// the general and vector register files (or the producer tags they hold), renames the
// destination and writes the instruction into a reservation station or buffer.
// Execute: the general execution unit, two vector execution units (4x4SAD, SATD, NAC, NAC2,
// lane moves) and the load/store buffers (LW, SW, 4x4RD, 4x4RD2 on the L1 D-cache) run
// whatever has its operands, out of program order.
// Write-back: the common data bus carries one {tag, value} per cycle, granted round-robin,
// to every station, buffer and register file.
// The host ports stand for the refill paths from the second-level caches and main memory,
// which are outside this design; they load program and data while run is low and read data
// back. done rises once HALT has reached the queue head and every station is empty; the
// control-register counters (cycles, issued instructions, vector instructions, stall
// cycles) give the cycle count and IPC of the program. The events port pulses for one
// cycle on each occurrence of the mechanisms named there, for monitoring.
module vrisc_top
  import vrisc_pkg::*;
#(
  parameter int IMEM_WORDS = 1024,
  parameter int DMEM_WORDS = 4096,
  parameter int IQ_DEPTH   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  // program fill
  input  logic        host_iwr,
  input  logic [$clog2(IMEM_WORDS)-1:0] host_iaddr,
  input  logic [31:0] host_iwdata,
  // data fill / read-back (word address, read data one cycle later)
  input  logic        host_dwr,
  input  logic        host_drd,
  input  logic [31:0] host_daddr,
  input  logic [31:0] host_dwdata,
  output logic [31:0] host_drdata,
  // status
  output logic        done,
  output logic [31:0] counters [4],
  input  logic [4:0]  dbg_greg,
  output logic [31:0] dbg_gval,
  input  logic [3:0]  dbg_vreg,
  output logic [127:0] dbg_vval,
  // per-cycle events: 0 branch stall, 1 station-full stall, 2 load passed an older store,
  // 3 load held by an older store, 4 store written, 5 taken branch, 6 bus contention
  output logic [6:0]  events
);
  localparam int PCW = $clog2(IMEM_WORDS);

  cdb_t cdb;

  // fetch
  logic           ic_rd_en, q_push, q_pop, q_valid, redirect;
  logic [PCW-1:0] ic_addr, q_push_pc, q_pc, target;
  logic [31:0]    ic_data, q_push_instr, q_instr;
  logic [$clog2(IQ_DEPTH+1)-1:0] q_count;

  icache #(.NWORDS(IMEM_WORDS)) u_icache (
    .clk, .rd_en(ic_rd_en), .rd_addr(ic_addr), .rd_data(ic_data),
    .host_wr(host_iwr), .host_addr(host_iaddr), .host_wdata(host_iwdata)
  );

  imem_ctrl #(.PCW(PCW), .QDEPTH(IQ_DEPTH)) u_imc (
    .clk, .rst_n, .run, .redirect, .target, .q_count, .q_pop,
    .ic_rd_en, .ic_addr, .ic_data,
    .push(q_push), .push_pc(q_push_pc), .push_instr(q_push_instr)
  );

  instr_queue #(.DEPTH(IQ_DEPTH), .PCW(PCW)) u_iq (
    .clk, .rst_n, .flush(redirect), .push(q_push), .push_pc(q_push_pc),
    .push_instr(q_push_instr), .pop(q_pop), .head_valid(q_valid), .head_pc(q_pc),
    .head_instr(q_instr), .count(q_count)
  );

  // issue
  logic [4:0]      g_addr [3];
  operand_t        g_data [3];
  logic [3:0]      v_addr [2];
  operand_t        v_data [2];
  logic            g_set_en, v_set_en;
  logic [4:0]      g_set_reg;
  logic [3:0]      v_set_reg;
  logic [TAGW-1:0] set_tag;
  logic [1:0]      csr_sel;
  logic [31:0]     csr_val;
  logic [4:0]      st_full, alloc;
  logic [TAGW-1:0] st_tag [4];
  rs_req_t         req;
  logic            vec_pref, halted, issued, issued_vec, stall, stall_branch, stall_struct;
  logic [3:0]      busy;

  ooo_scheduler #(.PCW(PCW)) u_sched (
    .run, .head_valid(q_valid), .head_pc(q_pc), .head_instr(q_instr), .pop(q_pop),
    .redirect, .target, .g_addr, .g_data, .v_addr, .v_data, .g_set_en, .g_set_reg,
    .v_set_en, .v_set_reg, .set_tag, .cdb, .csr_sel, .csr_val, .st_full, .st_tag,
    .alloc, .req, .vec_pref, .halted, .issued, .issued_vec, .stall, .stall_branch,
    .stall_struct
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vec_pref <= 1'b0;
    else if (alloc[1] || alloc[2]) vec_pref <= alloc[1];

  gen_regfile u_grf (
    .clk, .rst_n, .rd_addr(g_addr), .rd_data(g_data), .set_en(g_set_en),
    .set_reg(g_set_reg), .set_tag, .cdb, .dbg_addr(dbg_greg), .dbg_data(dbg_gval)
  );

  vec_regfile u_vrf (
    .clk, .rst_n, .rd_addr(v_addr), .rd_data(v_data), .set_en(v_set_en),
    .set_reg(v_set_reg), .set_tag, .cdb, .dbg_addr(dbg_vreg), .dbg_data(dbg_vval)
  );

  ctrl_regs u_csr (
    .clk, .rst_n, .running(run && !done), .issued, .issued_vec, .stalled(stall),
    .rd_sel(csr_sel), .rd_val(csr_val), .cnt(counters)
  );

  // execute
  logic [3:0]      cdb_req, cdb_gnt;
  logic [TAGW-1:0] cdb_req_tag  [4];
  logic [VLEN-1:0] cdb_req_data [4];

  gen_exec_unit #(.TAG_BASE(TAG_GEU)) u_geu (
    .clk, .rst_n, .alloc_valid(alloc[0]), .alloc_req(req), .full(st_full[0]),
    .alloc_tag(st_tag[0]), .busy_any(busy[0]), .cdb, .req_valid(cdb_req[0]),
    .req_tag(cdb_req_tag[0]), .req_data(cdb_req_data[0]), .grant(cdb_gnt[0])
  );

  vec_exec_unit #(.TAG_BASE(TAG_VEU1)) u_veu1 (
    .clk, .rst_n, .alloc_valid(alloc[1]), .alloc_req(req), .full(st_full[1]),
    .alloc_tag(st_tag[1]), .busy_any(busy[1]), .cdb, .req_valid(cdb_req[1]),
    .req_tag(cdb_req_tag[1]), .req_data(cdb_req_data[1]), .grant(cdb_gnt[1])
  );

  vec_exec_unit #(.TAG_BASE(TAG_VEU2)) u_veu2 (
    .clk, .rst_n, .alloc_valid(alloc[2]), .alloc_req(req), .full(st_full[2]),
    .alloc_tag(st_tag[2]), .busy_any(busy[2]), .cdb, .req_valid(cdb_req[2]),
    .req_tag(cdb_req_tag[2]), .req_data(cdb_req_data[2]), .grant(cdb_gnt[2])
  );

  logic        dc_rd_en, dc_wr_en, ev_ld_bypass, ev_ld_blocked, ev_st_done;
  logic [31:0] dc_rd_addr, dc_wr_addr, dc_wr_data;
  logic [127:0] dc_rd_data;

  mem_buffers u_lsb (
    .clk, .rst_n, .lb_alloc_valid(alloc[3]), .lb_alloc_req(req), .lb_full(st_full[3]),
    .lb_alloc_tag(st_tag[3]), .sb_alloc_valid(alloc[4]), .sb_alloc_req(req),
    .sb_full(st_full[4]), .busy_any(busy[3]), .cdb, .req_valid(cdb_req[3]),
    .req_tag(cdb_req_tag[3]), .req_data(cdb_req_data[3]), .grant(cdb_gnt[3]),
    .dc_rd_en, .dc_rd_addr, .dc_rd_data, .dc_wr_en, .dc_wr_addr, .dc_wr_data,
    .ev_ld_bypass, .ev_ld_blocked, .ev_st_done
  );

  dcache #(.NWORDS(DMEM_WORDS)) u_dcache (
    .clk, .rd_en(dc_rd_en), .rd_addr(dc_rd_addr), .rd_data(dc_rd_data),
    .wr_en(dc_wr_en), .wr_addr(dc_wr_addr), .wr_data(dc_wr_data),
    .host_wr(host_dwr), .host_rd(host_drd), .host_addr(host_daddr),
    .host_wdata(host_dwdata), .host_rdata(host_drdata)
  );

  // write-back
  cdb_arbiter #(.N(4)) u_cdb (
    .clk, .rst_n, .req(cdb_req), .req_tag(cdb_req_tag), .req_data(cdb_req_data),
    .grant(cdb_gnt), .cdb
  );

  assign done = halted && busy == '0;
  assign events = {(cdb_req & (cdb_req - 4'd1)) != 4'd0, redirect, ev_st_done, ev_ld_blocked, ev_ld_bypass,
                   stall_struct, stall_branch};
endmodule
