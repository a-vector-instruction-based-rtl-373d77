// gen_regfile: General Register File with Tomasulo register status.
//
// NREG registers of XLEN bits, each with a producer tag (0 = value is current). Three
// combinational read ports return {tag, value} for the scheduler (rs1, rs2 and the rd field,
// which SW and branches read). At issue, set_en renames register set_reg to set_tag. Every
// cycle the file snoops the common data bus: a register whose tag matches the broadcast tag
// takes the low XLEN bits and becomes current. A rename in the same cycle wins over that
// write-back, since the newer producer is the one that must update the register.
// Register 0 reads as zero and is never renamed. Sizes are this design's choice.
module gen_regfile
  import vrisc_pkg::*;
#(
  parameter int NREG = NGREG
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NREG)-1:0] rd_addr [3],
  output operand_t                rd_data [3],
  input  logic                    set_en,
  input  logic [$clog2(NREG)-1:0] set_reg,
  input  logic [TAGW-1:0]         set_tag,
  input  cdb_t                    cdb,
  // debug view for testbenches
  input  logic [$clog2(NREG)-1:0] dbg_addr,
  output logic [XLEN-1:0]         dbg_data
);
  logic [XLEN-1:0] val [NREG];
  logic [TAGW-1:0] tag [NREG];

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      rd_data[p].tag = tag[rd_addr[p]];
      rd_data[p].val = VLEN'(val[rd_addr[p]]);
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
      for (int r = 1; r < NREG; r++)
        if (cdb.valid && tag[r] != '0 && tag[r] == cdb.tag) begin
          val[r] <= cdb.data[XLEN-1:0];
          tag[r] <= '0;
        end
      if (set_en && set_reg != '0) tag[set_reg] <= set_tag;
    end
  end
endmodule
