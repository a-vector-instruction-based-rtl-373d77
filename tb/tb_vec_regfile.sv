// tb_vec_regfile: renames registers to tags, broadcasts results on the bus and checks the
// read ports against a model of values and tags, including the rule that a rename in the
// same cycle as a matching broadcast wins. All sixteen vector registers are renameable.
module tb_vec_regfile;
  import vrisc_pkg::*;
  logic clk = 0, rst_n = 0, set_en = 0;
  logic [3:0] rd_addr [2], set_reg = '0, dbg_addr = '0;
  operand_t rd_data [2];
  logic [TAGW-1:0] set_tag = '0;
  cdb_t cdb;
  logic [127:0] dbg_data;
  logic [127:0] mval [16];
  logic [3:0]  mtag [16];
  int checks = 0, failures = 0, races = 0;

  vec_regfile #(.NREG(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cdb = '0;
    for (int r = 0; r < 16; r++) begin mval[r] = 0; mtag[r] = 0; end
    for (int p = 0; p < 2; p++) rd_addr[p] = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        rd_addr[p] = 4'($urandom);
        #1;
        checks++;
        if (rd_data[p].tag != mtag[rd_addr[p]] || rd_data[p].val != mval[rd_addr[p]]) begin
          failures++; $display("FAIL r%0d", rd_addr[p]);
        end
      end
      set_en = $urandom_range(0, 1);
      set_reg = 4'($urandom); set_tag = 4'($urandom_range(1, 12));
      cdb.valid = $urandom_range(0, 1); cdb.tag = 4'($urandom_range(1, 12)); cdb.data = {4{$urandom}};
      @(posedge clk);
      for (int r = 0; r < 16; r++)
        if (cdb.valid && mtag[r] != 0 && mtag[r] == cdb.tag) begin
          if (set_en && set_reg == 4'(r)) races++;
          mval[r] = cdb.data; mtag[r] = 0;
        end
      if (set_en) mtag[set_reg] = set_tag;
    end
    checks++;
    if (races == 0) begin failures++; $display("FAIL rename/write-back race never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
