// tb_dcache: fills the four-bank data SRAM with random words, then reads at random byte
// addresses and checks that the four consecutive words from (addr >> 2) come back one cycle
// later; also checks core writes and host read-back.
module tb_dcache;
  logic clk = 0, rd_en = 0, wr_en = 0, host_wr = 0, host_rd = 0;
  logic [31:0] rd_addr = '0, wr_addr = '0, wr_data = '0, host_addr = '0, host_wdata = '0;
  logic [127:0] rd_data;
  logic [31:0] host_rdata;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  dcache #(.NWORDS(1024)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      model[i] = $urandom;
      @(negedge clk); host_wr = 1; host_addr = i; host_wdata = model[i];
    end
    @(negedge clk); host_wr = 0;
    for (int n = 0; n < 300; n++) begin
      int a, w;
      if (n % 3 == 0) begin
        @(negedge clk); wr_en = 1; wr_addr = 4 * $urandom_range(0, 1023); wr_data = $urandom;
        model[wr_addr / 4] = wr_data;
        @(negedge clk); wr_en = 0;
      end
      a = $urandom_range(0, 4 * 1020);
      w = a / 4;
      @(negedge clk); rd_en = 1; rd_addr = a;
      @(negedge clk); rd_en = 0;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (rd_data[32*k +: 32] != model[w + k]) begin failures++; $display("FAIL addr %0d word %0d", a, k); end
      end
      @(negedge clk); host_rd = 1; host_addr = w;
      @(negedge clk); host_rd = 0;
      checks++;
      if (host_rdata != model[w]) begin failures++; $display("FAIL host read %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
