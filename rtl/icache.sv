// icache: L1 instruction SRAM.
//
// NWORDS 32-bit instruction words, addressed by word (the program counter counts words).
// One synchronous read port for the instruction memory controller (data one cycle after
// rd_en) and a host write port for filling it from the next memory level. It stands for the
// L1 I-cache: it holds the whole program and has no tags or misses, since the levels behind
// it are outside this design. Size and latency are this design's choices.
module icache #(
  parameter int NWORDS = 1024
) (
  input  logic                      clk,
  input  logic                      rd_en,
  input  logic [$clog2(NWORDS)-1:0] rd_addr,
  output logic [31:0]               rd_data,
  input  logic                      host_wr,
  input  logic [$clog2(NWORDS)-1:0] host_addr,
  input  logic [31:0]               host_wdata
);
  logic [31:0] mem [NWORDS];
  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (host_wr) mem[host_addr] <= host_wdata;
  end
endmodule
