// vec_regfile: Vector Register File with Tomasulo register status.
//
// NREG registers of VLEN (128) bits, each holding a 4x4 pixel block or four 32-bit lanes,
// with a producer tag per register (0 = current). Two combinational read ports serve the
// scheduler; set_en renames a register at issue; the file snoops the common data bus and
// writes a broadcast result into every register still waiting on that tag. A same-cycle
// rename wins over the write-back. Sizes are this design's choice.
module vec_regfile
  import vrisc_pkg::*;
#(
  parameter int NREG = NVREG
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NREG)-1:0] rd_addr [2],
  output operand_t                rd_data [2],
  input  logic                    set_en,
  input  logic [$clog2(NREG)-1:0] set_reg,
  input  logic [TAGW-1:0]         set_tag,
  input  cdb_t                    cdb,
  input  logic [$clog2(NREG)-1:0] dbg_addr,
  output logic [VLEN-1:0]         dbg_data
);
  logic [VLEN-1:0] val [NREG];
  logic [TAGW-1:0] tag [NREG];

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      rd_data[p].tag = tag[rd_addr[p]];
      rd_data[p].val = val[rd_addr[p]];
    end
    dbg_data = val[dbg_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) begin
        val[r] <= '0;
        tag[r] <= '0;
      end
    end else begin
      for (int r = 0; r < NREG; r++)
        if (cdb.valid && tag[r] != '0 && tag[r] == cdb.tag) begin
          val[r] <= cdb.data;
          tag[r] <= '0;
        end
      if (set_en) tag[set_reg] <= set_tag;
    end
  end
endmodule
