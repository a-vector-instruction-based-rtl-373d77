// tb_imem_ctrl: the fetch controller with an instruction SRAM and the instruction queue.
// Pops at random, redirects at random; checks that the queue receives consecutive words
// from the current fetch path with their pcs, that after a redirect the next instruction
// is the target, and that the queue never overflows (it does reach full).
module tb_imem_ctrl;
  logic clk = 0, rst_n = 0, run = 0, redirect = 0, pop = 0;
  logic [9:0] target = '0, ic_addr, push_pc, head_pc;
  logic [31:0] ic_data, push_instr, head_instr;
  logic [3:0] q_count;
  logic ic_rd_en, push, head_valid;
  int checks = 0, failures = 0, fulls = 0, redirects = 0;

  imem_ctrl #(.PCW(10), .QDEPTH(8)) dut (
    .clk, .rst_n, .run, .redirect, .target, .q_count, .q_pop(pop), .ic_rd_en, .ic_addr,
    .ic_data, .push, .push_pc, .push_instr
  );
  instr_queue #(.DEPTH(8), .PCW(10)) u_q (
    .clk, .rst_n, .flush(redirect), .push, .push_pc, .push_instr, .pop, .head_valid, .head_pc,
    .head_instr, .count(q_count)
  );
  icache #(.NWORDS(1024)) u_ic (
    .clk, .rd_en(ic_rd_en), .rd_addr(ic_addr), .rd_data(ic_data), .host_wr(1'b0),
    .host_addr(10'd0), .host_wdata(32'd0)
  );
  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] expect_pc;
    for (int i = 0; i < 1024; i++) u_ic.mem[i] = 32'hA500_0000 | i;
    #12 rst_n = 1;
    @(negedge clk); run = 1;
    expect_pc = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      redirect = 0;
      if (q_count == 8) fulls++;
      pop = head_valid && $urandom_range(0, 2) != 0 && n > 50;
      if (pop) begin
        checks++;
        if (head_pc != expect_pc || head_instr != (32'hA500_0000 | head_pc)) begin
          failures++; $display("FAIL pc %0d expected %0d", head_pc, expect_pc);
        end
        expect_pc = head_pc + 1;
        if ($urandom_range(0, 9) == 0) begin
          redirect = 1; target = 10'($urandom); expect_pc = target; redirects++;
        end
      end
    end
    checks += 2;
    if (fulls == 0) begin failures++; $display("FAIL queue never filled"); end
    if (redirects == 0) begin failures++; $display("FAIL no redirect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
