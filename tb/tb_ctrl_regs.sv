// tb_ctrl_regs: drives random event patterns and checks each counter and the read port
// against counts kept by the testbench.
module tb_ctrl_regs;
  logic clk = 0, rst_n = 0, running, issued, issued_vec, stalled;
  logic [1:0] rd_sel;
  logic [31:0] rd_val;
  logic [31:0] cnt [4];
  int checks = 0, failures = 0;
  int e [4];

  ctrl_regs dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    running = 0; issued = 0; issued_vec = 0; stalled = 0; rd_sel = 0;
    for (int i = 0; i < 4; i++) e[i] = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      {running, issued, issued_vec, stalled} = 4'($urandom);
      @(posedge clk);
      e[0] += running; e[1] += issued; e[2] += issued_vec; e[3] += stalled;
    end
    @(negedge clk);
    {running, issued, issued_vec, stalled} = '0;
    for (int i = 0; i < 4; i++) begin
      rd_sel = 2'(i); #1;
      checks += 2;
      if (cnt[i] != 32'(e[i])) begin failures++; $display("FAIL cnt%0d %0d vs %0d", i, cnt[i], e[i]); end
      if (rd_val != 32'(e[i])) begin failures++; $display("FAIL rd_val %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
