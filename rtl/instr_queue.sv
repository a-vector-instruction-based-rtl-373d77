// instr_queue: Instruction Queue between the instruction fetch and the scheduler.
//
// A DEPTH-entry FIFO of {pc, instruction}. Instructions leave in the order they arrived,
// which is what keeps issue in program order while execution is out of order. push and pop
// may happen in the same cycle; flush empties the queue (a taken branch) and wins over a
// push in the same cycle. count lets the fetch unit reserve room for a read in flight.
// Depth is this design's choice.
module instr_queue #(
  parameter int DEPTH = 8,
  parameter int PCW   = 10
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           flush,
  input  logic           push,
  input  logic [PCW-1:0] push_pc,
  input  logic [31:0]    push_instr,
  input  logic           pop,
  output logic           head_valid,
  output logic [PCW-1:0] head_pc,
  output logic [31:0]    head_instr,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [PCW-1:0] pcs  [DEPTH];
  logic [31:0]    ins  [DEPTH];
  logic [AW-1:0]  rptr, wptr;

  assign head_valid = count != 0;
  assign head_pc    = pcs[rptr];
  assign head_instr = ins[rptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr <= '0; wptr <= '0; count <= '0;
      for (int i = 0; i < DEPTH; i++) begin pcs[i] <= '0; ins[i] <= '0; end
    end else if (flush) begin
      rptr <= '0; wptr <= '0; count <= '0;
    end else begin
      logic do_push, do_pop;
      do_pop  = pop && head_valid;
      do_push = push && (count != ($clog2(DEPTH+1))'(DEPTH) || do_pop);
      if (do_push) begin
        pcs[wptr] <= push_pc;
        ins[wptr] <= push_instr;
        wptr <= inc(wptr);
      end
      if (do_pop) rptr <= inc(rptr);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (push && !flush && !pop) |-> count != ($clog2(DEPTH+1))'(DEPTH));
endmodule
