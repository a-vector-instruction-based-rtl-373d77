// dcache: L1 data SRAM as seen by the load and store buffers.
//
// NWORDS 32-bit words split into four banks by word address modulo 4, so that one
// synchronous read returns the four consecutive words starting at word (addr >> 2) for any
// byte address. That is exactly what one row of a 4x4RD (four adjacent bytes at any
// alignment) or of a 4x4RD2 (four bytes spaced four apart) needs, so a 4x4 load reads one
// row per cycle. Read data appear one cycle after rd_en. The core write port writes one
// aligned word. A host port (fill from the next memory level) writes and reads single words;
// it must not be used while the core accesses the array. Read addresses wrap at the array end.
// This block stands for the L1 D-cache: it holds the working set and has no tags, misses or
// refill, since the levels behind it are outside this design. Bank organisation, sizes and
// latency are this design's choices.
module dcache #(
  parameter int NWORDS = 4096        // 16 KiB
) (
  input  logic        clk,
  input  logic        rd_en,
  input  logic [31:0] rd_addr,       // byte address
  output logic [127:0] rd_data,      // words w..w+3, word k in bits [32k +: 32]
  input  logic        wr_en,
  input  logic [31:0] wr_addr,       // byte address, word aligned
  input  logic [31:0] wr_data,
  input  logic        host_wr,
  input  logic        host_rd,
  input  logic [31:0] host_addr,     // word address
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata
);
  localparam int BW = $clog2(NWORDS / 4);
  logic [1:0]  rot_q, hsel_q;
  logic [31:0] bank_q [4];
  logic [31:0] w;
  logic        w_en;
  logic [31:0] w_addr, w_data;
  logic [BW-1:0] b_raddr [4];

  assign w      = rd_addr >> 2;
  assign w_en   = wr_en | host_wr;
  assign w_addr = host_wr ? host_addr : (wr_addr >> 2);
  assign w_data = host_wr ? host_wdata : wr_data;

  // bank b holds the words whose address mod 4 is b; for a read starting at word w it
  // supplies word w + ((b - w) mod 4)
  always_comb
    for (int b = 0; b < 4; b++) begin
      logic [31:0] word;
      word = host_rd ? host_addr : (w + 32'(2'(2'(b) - w[1:0])));
      b_raddr[b] = word[BW+1:2];
    end

  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic [31:0] mem [NWORDS/4];
    always_ff @(posedge clk) begin
      if (rd_en || host_rd) bank_q[b] <= mem[b_raddr[b]];
      if (w_en && w_addr[1:0] == 2'(b)) mem[w_addr[BW+1:2]] <= w_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) rot_q <= w[1:0];
    if (host_rd) hsel_q <= host_addr[1:0];
  end

  always_comb begin
    for (int k = 0; k < 4; k++) rd_data[32*k +: 32] = bank_q[2'(rot_q + 2'(k))];
    host_rdata = bank_q[hsel_q];
  end

  assert property (@(posedge clk) !(host_wr && wr_en));
  assert property (@(posedge clk) !(host_rd && rd_en));
endmodule
