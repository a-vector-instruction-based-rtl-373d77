// res_station: Tomasulo reservation station shared by the execution units.
//
// Holds up to DEPTH issued operations waiting for their operands. Entry i owns result tag
// TAG_BASE+i. An operand that is not yet available carries the tag of its producer; the
// station snoops the common data bus (CDB) every cycle and captures the value when that tag
// is broadcast. The lowest-numbered entry whose two operands are present and which is not
// already executing is handed to the functional unit when fu_ready is high (one per cycle).
// The entry stays allocated until its own tag appears on the CDB, so a tag is never reused
// while its result is still in flight.
// Timing: alloc_valid writes the entry at the clock edge; an entry can dispatch at the
// earliest in the cycle after allocation. The issuing logic must forward a value that is on
// the CDB in the allocation cycle itself (the station does not see it for a new entry).
// The dispatch policy (lowest index) and the free-on-broadcast rule are this design's choice.
module res_station
  import vrisc_pkg::*;
#(
  parameter int              DEPTH    = RS_DEPTH,
  parameter logic [TAGW-1:0] TAG_BASE = 4'd1
) (
  input  logic            clk,
  input  logic            rst_n,
  // allocation from the scheduler
  input  logic            alloc_valid,
  input  rs_req_t         alloc_req,
  output logic            full,
  output logic [TAGW-1:0] alloc_tag,
  output logic            busy_any,
  // CDB snoop
  input  cdb_t            cdb,
  // dispatch to the functional unit
  input  logic            fu_ready,
  output logic            disp_valid,
  output fu_op_t          disp
);
  typedef struct packed {
    logic    busy;
    logic    exec;
    rs_req_t req;
  } entry_t;

  entry_t ent [DEPTH];
  int unsigned free_idx, disp_idx;
  logic have_free;

  function automatic logic [TAGW-1:0] tag_of(int unsigned i);
    return TAG_BASE + TAGW'(i);
  endfunction

  always_comb begin
    have_free = 1'b0;
    free_idx  = 0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (!ent[i].busy) begin have_free = 1'b1; free_idx = i; end
    full      = !have_free;
    alloc_tag = tag_of(free_idx);
    busy_any  = 1'b0;
    for (int i = 0; i < DEPTH; i++) busy_any |= ent[i].busy;

    disp_valid = 1'b0;
    disp_idx   = 0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (ent[i].busy && !ent[i].exec && ent[i].req.a.tag == '0 && ent[i].req.b.tag == '0) begin
        disp_valid = fu_ready;
        disp_idx   = i;
      end
    disp.op  = ent[disp_idx].req.op;
    disp.a   = ent[disp_idx].req.a.val;
    disp.b   = ent[disp_idx].req.b.val;
    disp.imm = ent[disp_idx].req.imm;
    disp.tag = tag_of(disp_idx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) ent[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (ent[i].busy) begin
          if (cdb.valid && ent[i].req.a.tag != '0 && cdb.tag == ent[i].req.a.tag) begin
            ent[i].req.a.tag <= '0;
            ent[i].req.a.val <= cdb.data;
          end
          if (cdb.valid && ent[i].req.b.tag != '0 && cdb.tag == ent[i].req.b.tag) begin
            ent[i].req.b.tag <= '0;
            ent[i].req.b.val <= cdb.data;
          end
          if (cdb.valid && ent[i].exec && cdb.tag == tag_of(i)) ent[i].busy <= 1'b0;
        end
      end
      if (disp_valid) ent[disp_idx].exec <= 1'b1;
      if (alloc_valid && have_free) begin
        ent[free_idx].busy <= 1'b1;
        ent[free_idx].exec <= 1'b0;
        ent[free_idx].req  <= alloc_req;
      end
    end
  end

  // issue must not target a full station
  assert property (@(posedge clk) disable iff (!rst_n) alloc_valid |-> !full);
endmodule
