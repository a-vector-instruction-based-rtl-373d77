// mem_buffers: Load Buffers and Store Buffers with the 4x4RD / 4x4RD2 sequencer.
//
// Load buffer (LB_DEPTH entries, entry i owns result tag TAG_LB+i) takes LW, LD4X4 (4x4RD)
// and LD4X4_2 (4x4RD2); the store buffer (SB_DEPTH entries) takes SW. Operands that are
// not ready are captured from the common data bus, as in a reservation station.
// Every memory operation receives a sequence number at issue so that program order between
// loads and stores is known. Memory accesses are reordered under two rules:
//   * a load may start ahead of older stores once every older store has its address and
//     none of them writes inside the load's byte range [lo, hi] (a conservative interval
//     check, hi = lo + 3*pitch + 3*step for 4x4 loads); otherwise it waits;
//   * stores write in program order, and only after every older load has read its data.
// Loads among themselves start in any order (lowest ready entry first).
// A 4x4 load reads four rows, one per cycle, from the four-bank data SRAM: row r starts at
// base + r*pitch (pitch = rs2); its four bytes are adjacent (4x4RD) or four apart (4x4RD2,
// samples of one quarter-pel phase in a 4x up-sampled plane). Pixel (r,c) goes to byte 4r+c
// of the vector. LW reads four bytes at base+imm at any alignment; SW writes the aligned
// word at (base+imm) & ~3. A load starts only when its result register is empty; the
// result waits there for the bus. Latency of a 4x4 load: 5 cycles to the result register
// (LW: 2). An entry is freed when its result has been broadcast (loads) or written (stores).
// The three-entry buffers follow the architecture; the ordering rules, the row-per-cycle
// sequencing and the sequence numbers are this design's choices.
module mem_buffers
  import vrisc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            lb_alloc_valid,
  input  rs_req_t         lb_alloc_req,   // a = base, b = pitch (4x4 loads), imm = offset
  output logic            lb_full,
  output logic [TAGW-1:0] lb_alloc_tag,
  input  logic            sb_alloc_valid,
  input  rs_req_t         sb_alloc_req,   // a = base, b = store data, imm = offset
  output logic            sb_full,
  output logic            busy_any,
  input  cdb_t            cdb,
  output logic            req_valid,
  output logic [TAGW-1:0] req_tag,
  output logic [VLEN-1:0] req_data,
  input  logic            grant,
  // data SRAM
  output logic            dc_rd_en,
  output logic [31:0]     dc_rd_addr,
  input  logic [127:0]    dc_rd_data,
  output logic            dc_wr_en,
  output logic [31:0]     dc_wr_addr,
  output logic [31:0]     dc_wr_data,
  // events
  output logic            ev_ld_bypass,   // a load started ahead of an older pending store
  output logic            ev_ld_blocked,  // a ready load was held back by an older store
  output logic            ev_st_done
);
  localparam int LB = LB_DEPTH;
  localparam int SB = SB_DEPTH;

  typedef struct packed {
    logic       busy;
    logic       started;
    logic       rdone;
    logic [3:0] seq;
    rs_req_t    req;
  } lb_t;
  typedef struct packed {
    logic       busy;
    logic [3:0] seq;
    rs_req_t    req;
  } sb_t;

  lb_t lb [LB];
  sb_t sb [SB];
  logic [3:0] seq_ctr;

  // load sequencer
  logic        active, pend;
  logic [1:0]  cur, pend_row;
  logic [2:0]  row_issue;
  logic [1:0]  pend_off;
  logic [95:0] asm_q;

  function automatic logic older(logic [3:0] x, logic [3:0] y);
    logic [3:0] d;
    d = y - x;
    return d != 0 && d < 8;
  endfunction

  function automatic logic [31:0] ld_lo(rs_req_t r);
    return r.a.val[31:0] + r.imm;
  endfunction
  function automatic logic [31:0] ld_hi(rs_req_t r);
    logic [31:0] st;
    st = (r.op == OP_LD4X4_2) ? 32'd4 : 32'd1;
    return (r.op == OP_LW) ? ld_lo(r) + 3 : ld_lo(r) + 3 * r.b.val[31:0] + 3 * st;
  endfunction
  function automatic logic [31:0] st_addr(rs_req_t r);
    return (r.a.val[31:0] + r.imm) & ~32'd3;
  endfunction

  logic [LB-1:0] ld_ready, ld_ok, ld_older_st;
  logic          start;
  int unsigned   sel, lfree, sfree, st_sel;
  logic          have_lfree, have_sfree, st_go;
  logic [31:0]   row_addr;
  logic [2:0]    nrows;
  rs_req_t       creq;

  always_comb begin
    // free entries
    have_lfree = 1'b0; lfree = 0;
    for (int i = LB - 1; i >= 0; i--) if (!lb[i].busy) begin have_lfree = 1'b1; lfree = i; end
    have_sfree = 1'b0; sfree = 0;
    for (int j = SB - 1; j >= 0; j--) if (!sb[j].busy) begin have_sfree = 1'b1; sfree = j; end
    lb_full      = !have_lfree;
    sb_full      = !have_sfree;
    lb_alloc_tag = TAG_LB + TAGW'(lfree);
    busy_any     = 1'b0;
    for (int i = 0; i < LB; i++) busy_any |= lb[i].busy;
    for (int j = 0; j < SB; j++) busy_any |= sb[j].busy;

    // load eligibility
    for (int i = 0; i < LB; i++) begin
      ld_ready[i]    = lb[i].busy && !lb[i].started && lb[i].req.a.tag == '0 && lb[i].req.b.tag == '0;
      ld_ok[i]       = ld_ready[i];
      ld_older_st[i] = 1'b0;
      for (int j = 0; j < SB; j++)
        if (sb[j].busy && older(sb[j].seq, lb[i].seq)) begin
          ld_older_st[i] = 1'b1;
          if (sb[j].req.a.tag != '0) ld_ok[i] = 1'b0;
          else if (!(st_addr(sb[j].req) + 3 < ld_lo(lb[i].req) || st_addr(sb[j].req) > ld_hi(lb[i].req)))
            ld_ok[i] = 1'b0;
        end
    end
    sel = 0;
    for (int i = LB - 1; i >= 0; i--) if (ld_ok[i]) sel = i;
    start = !active && !req_valid && ld_ok != '0;
    ev_ld_bypass  = start && ld_older_st[sel];
    ev_ld_blocked = (ld_ready & ~ld_ok) != '0;

    // row reads
    creq     = start ? lb[sel].req : lb[cur].req;
    nrows    = (creq.op == OP_LW) ? 3'd1 : 3'd4;
    dc_rd_en = start || (active && row_issue < nrows);
    row_addr = ld_lo(creq) + (start ? 32'd0 : 32'(row_issue) * creq.b.val[31:0]);
    dc_rd_addr = row_addr;

    // store: the oldest store, once its operands are ready and no older load is unread
    st_go  = 1'b0;
    st_sel = 0;
    for (int j = 0; j < SB; j++) begin
      logic oldest, ld_clear;
      oldest   = sb[j].busy;
      for (int k = 0; k < SB; k++)
        if (k != j && sb[k].busy && older(sb[k].seq, sb[j].seq)) oldest = 1'b0;
      ld_clear = 1'b1;
      for (int i = 0; i < LB; i++)
        if (lb[i].busy && !lb[i].rdone && older(lb[i].seq, sb[j].seq)) ld_clear = 1'b0;
      if (oldest && ld_clear && sb[j].req.a.tag == '0 && sb[j].req.b.tag == '0) begin
        st_go = 1'b1; st_sel = j;
      end
    end
    dc_wr_en   = st_go;
    dc_wr_addr = st_addr(sb[st_sel].req);
    dc_wr_data = sb[st_sel].req.b.val[31:0];
    ev_st_done = st_go;
  end

  // byte gather from the four words returned by the SRAM
  logic [31:0] row_bytes;
  always_comb begin
    logic [7:0] bytes [16];
    logic [4:0] step;
    for (int k = 0; k < 16; k++) bytes[k] = dc_rd_data[8*k +: 8];
    step = (lb[cur].req.op == OP_LD4X4_2) ? 5'd4 : 5'd1;
    for (int c = 0; c < 4; c++) begin
      logic [4:0] idx;
      idx = 5'(pend_off) + 5'(c) * step;
      row_bytes[8*c +: 8] = bytes[idx[3:0]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LB; i++) lb[i] <= '0;
      for (int j = 0; j < SB; j++) sb[j] <= '0;
      seq_ctr <= '0;
      active <= 1'b0; pend <= 1'b0; cur <= '0; pend_row <= '0; row_issue <= '0;
      pend_off <= '0; asm_q <= '0;
      req_valid <= 1'b0; req_tag <= '0; req_data <= '0;
    end else begin
      // operand capture and release
      for (int i = 0; i < LB; i++) if (lb[i].busy) begin
        if (cdb.valid && lb[i].req.a.tag != '0 && cdb.tag == lb[i].req.a.tag) begin
          lb[i].req.a.tag <= '0; lb[i].req.a.val <= cdb.data;
        end
        if (cdb.valid && lb[i].req.b.tag != '0 && cdb.tag == lb[i].req.b.tag) begin
          lb[i].req.b.tag <= '0; lb[i].req.b.val <= cdb.data;
        end
        if (cdb.valid && lb[i].rdone && cdb.tag == TAG_LB + TAGW'(i)) lb[i].busy <= 1'b0;
      end
      for (int j = 0; j < SB; j++) if (sb[j].busy) begin
        if (cdb.valid && sb[j].req.a.tag != '0 && cdb.tag == sb[j].req.a.tag) begin
          sb[j].req.a.tag <= '0; sb[j].req.a.val <= cdb.data;
        end
        if (cdb.valid && sb[j].req.b.tag != '0 && cdb.tag == sb[j].req.b.tag) begin
          sb[j].req.b.tag <= '0; sb[j].req.b.val <= cdb.data;
        end
      end
      if (st_go) sb[st_sel].busy <= 1'b0;

      // load sequencing
      if (grant) req_valid <= 1'b0;
      if (start) begin
        active    <= 1'b1;
        cur       <= 2'(sel);
        lb[sel].started <= 1'b1;
        row_issue <= 3'd1;
      end else if (dc_rd_en) begin
        row_issue <= row_issue + 1'b1;
      end
      pend     <= dc_rd_en;
      pend_row <= start ? 2'd0 : row_issue[1:0];
      pend_off <= row_addr[1:0];
      if (pend) begin
        logic last;
        last = (lb[cur].req.op == OP_LW) || pend_row == 2'd3;
        if (pend_row != 2'd3) asm_q[32*pend_row +: 32] <= row_bytes;
        if (last) begin
          active    <= 1'b0;
          lb[cur].rdone <= 1'b1;
          req_valid <= 1'b1;
          req_tag   <= TAG_LB + TAGW'(cur);
          req_data  <= (lb[cur].req.op == OP_LW) ? VLEN'(row_bytes) : {row_bytes, asm_q};
        end
      end

      // allocation
      if (lb_alloc_valid && have_lfree) begin
        lb[lfree] <= '{busy: 1'b1, started: 1'b0, rdone: 1'b0, seq: seq_ctr, req: lb_alloc_req};
      end
      if (sb_alloc_valid && have_sfree) begin
        sb[sfree] <= '{busy: 1'b1, seq: seq_ctr, req: sb_alloc_req};
      end
      if (lb_alloc_valid || sb_alloc_valid) seq_ctr <= seq_ctr + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) lb_alloc_valid |-> !lb_full);
  assert property (@(posedge clk) disable iff (!rst_n) sb_alloc_valid |-> !sb_full);
  assert property (@(posedge clk) disable iff (!rst_n) !(lb_alloc_valid && sb_alloc_valid));
endmodule
