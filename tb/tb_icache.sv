// tb_icache: fills the instruction SRAM through the host port and reads it back in random
// order, checking the one-cycle read latency.
module tb_icache;
  logic clk = 0, rd_en = 0, host_wr = 0;
  logic [9:0] rd_addr = '0, host_addr = '0;
  logic [31:0] rd_data, host_wdata = '0;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  icache #(.NWORDS(1024)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      model[i] = $urandom;
      @(negedge clk); host_wr = 1; host_addr = 10'(i); host_wdata = model[i];
    end
    @(negedge clk); host_wr = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk); rd_en = 1; rd_addr = 10'($urandom);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_data != model[rd_addr]) begin failures++; $display("FAIL addr %0d", rd_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
