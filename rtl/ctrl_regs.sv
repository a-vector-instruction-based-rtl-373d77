// ctrl_regs: Control Registers of the core.
//
// Four 32-bit counters that software reads with MFC and the host reads on ports:
//   0 cycles while running (not yet done), 1 instructions issued, 2 vector instructions
//   issued (4x4SAD, SATD, 4x4RD, 4x4RD2, NAC, NAC2, VINS, VEXT), 3 cycles in which the
//   scheduler had an instruction but could not issue it.
// Cycles and issued instructions give the instructions-per-cycle figure by which the
// architecture is evaluated. The counters clear on reset. The register set is this design's
// choice; the architecture only names a control-register block.
module ctrl_regs (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        running,
  input  logic        issued,
  input  logic        issued_vec,
  input  logic        stalled,
  input  logic [1:0]  rd_sel,
  output logic [31:0] rd_val,
  output logic [31:0] cnt [4]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) cnt[i] <= '0;
    end else begin
      if (running)    cnt[0] <= cnt[0] + 1;
      if (issued)     cnt[1] <= cnt[1] + 1;
      if (issued_vec) cnt[2] <= cnt[2] + 1;
      if (stalled)    cnt[3] <= cnt[3] + 1;
    end
  end
  assign rd_val = cnt[rd_sel];
endmodule
