// cdb_arbiter: Common Data Bus arbiter.
//
// N producers (load buffers and execution units) hold finished results in result registers
// and request the bus. The arbiter grants one requester per cycle with rotating
// (round-robin) priority, starting after the last winner, and drives the bus with the
// winner's {tag, data} in the same cycle; all reservation stations, buffers and register
// files capture it at the next clock edge. A producer that loses keeps requesting.
// The round-robin policy is this design's choice.
module cdb_arbiter
  import vrisc_pkg::*;
#(
  parameter int N = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    req,
  input  logic [TAGW-1:0] req_tag  [N],
  input  logic [VLEN-1:0] req_data [N],
  output logic [N-1:0]    grant,
  output cdb_t            cdb
);
  logic [$clog2(N)-1:0] last;
  int unsigned win;

  always_comb begin
    grant = '0;
    win   = 0;
    for (int k = N; k >= 1; k--)
      if (req[(int'(last) + k) % N]) win = (int'(last) + k) % N;
    if (req != '0) grant[win] = 1'b1;
    cdb.valid = req != '0;
    cdb.tag   = req_tag[win];
    cdb.data  = req_data[win];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) last <= $clog2(N)'(N - 1);
    else if (req != '0) last <= $clog2(N)'(win);

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
