// imem_ctrl: Instruction Memory Controller.
//
// Keeps the fetch program counter (in words), reads the L1 I-cache one instruction per
// cycle and pushes each word with its pc into the instruction queue one cycle later. A read
// is started only while the queue has room for it and for the read already in flight.
// A redirect (taken branch from the scheduler) loads the pc with the target and discards
// the read in flight; the queue is flushed in the same cycle. Fetch runs while run is high.
module imem_ctrl #(
  parameter int PCW   = 10,
  parameter int QDEPTH = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  logic           redirect,
  input  logic [PCW-1:0] target,
  input  logic [$clog2(QDEPTH+1)-1:0] q_count,
  input  logic           q_pop,
  // I-cache read port
  output logic           ic_rd_en,
  output logic [PCW-1:0] ic_addr,
  input  logic [31:0]    ic_data,
  // queue push
  output logic           push,
  output logic [PCW-1:0] push_pc,
  output logic [31:0]    push_instr
);
  logic [PCW-1:0] pc, pend_pc;
  logic           pend;
  int unsigned    occ;

  always_comb begin
    occ      = int'(q_count) + (pend ? 1 : 0) - ((q_pop && q_count != 0) ? 1 : 0);
    ic_rd_en = run && !redirect && occ < QDEPTH;
    ic_addr  = pc;
    push       = pend && !redirect;
    push_pc    = pend_pc;
    push_instr = ic_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; pend <= 1'b0; pend_pc <= '0;
    end else if (redirect) begin
      pc   <= target;
      pend <= 1'b0;
    end else begin
      pend <= ic_rd_en;
      if (ic_rd_en) begin
        pend_pc <= pc;
        pc      <= pc + 1'b1;
      end
    end
  end
endmodule
