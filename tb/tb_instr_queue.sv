// tb_instr_queue: random push/pop traffic against a queue model, with occasional flushes;
// checks order, count, the full condition and that flush empties the queue.
module tb_instr_queue;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0, head_valid;
  logic [9:0] push_pc = '0, head_pc;
  logic [31:0] push_instr = '0, head_instr;
  logic [3:0] count;
  logic [41:0] q [$];
  int checks = 0, failures = 0, fulls = 0;

  instr_queue #(.DEPTH(8), .PCW(10)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks += 2;
      if (count != 4'(q.size())) begin failures++; $display("FAIL count %0d vs %0d", count, q.size()); end
      if (q.size() > 0 && {head_pc, head_instr} != q[0]) begin failures++; $display("FAIL head"); end
      if (q.size() == 8) fulls++;
      flush = ($urandom_range(0, 99) == 0);
      pop   = $urandom_range(0, 2) == 0 && q.size() > 0;
      push  = $urandom_range(0, 1) == 0 && (q.size() < 8 || pop);
      push_pc = 10'($urandom); push_instr = $urandom;
      @(posedge clk);
      if (flush) q.delete();
      else begin
        if (pop) void'(q.pop_front());
        if (push) q.push_back({push_pc, push_instr});
      end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL queue never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
