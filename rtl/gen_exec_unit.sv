// gen_exec_unit: General Instruction Execution Unit with its reservation station.
//
// Executes the scalar integer operations (ADD, SUB, AND, OR, XOR, SLT, SLL, SRL, ADDI, LUI)
// and MFC (a control-register value captured at issue, passed through). A res_station
// collects operands; the ALU is combinational and its 32-bit result is registered in a
// result register that requests the common data bus. A new operation is accepted only while
// the result register is empty or being granted, so the unit completes one operation per
// cycle with a one-cycle latency when the bus is free. Operand a is rs1, operand b is rs2
// (ADDI/LUI use imm). The operation list is this design's choice.
module gen_exec_unit
  import vrisc_pkg::*;
#(
  parameter logic [TAGW-1:0] TAG_BASE = TAG_GEU
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            alloc_valid,
  input  rs_req_t         alloc_req,
  output logic            full,
  output logic [TAGW-1:0] alloc_tag,
  output logic            busy_any,
  input  cdb_t            cdb,
  output logic            req_valid,   // result waiting for the CDB
  output logic [TAGW-1:0] req_tag,
  output logic [VLEN-1:0] req_data,
  input  logic            grant
);
  logic   fu_ready, disp_valid;
  fu_op_t disp;
  logic [XLEN-1:0] res, a, b;

  assign fu_ready = !req_valid || grant;

  res_station #(.DEPTH(RS_DEPTH), .TAG_BASE(TAG_BASE)) u_rs (
    .clk, .rst_n, .alloc_valid, .alloc_req, .full, .alloc_tag, .busy_any,
    .cdb, .fu_ready, .disp_valid, .disp
  );

  always_comb begin
    a = disp.a[XLEN-1:0];
    b = disp.b[XLEN-1:0];
    unique case (disp.op)
      OP_ADD:  res = a + b;
      OP_SUB:  res = a - b;
      OP_AND:  res = a & b;
      OP_OR:   res = a | b;
      OP_XOR:  res = a ^ b;
      OP_SLT:  res = {31'd0, $signed(a) < $signed(b)};
      OP_SLL:  res = a << b[4:0];
      OP_SRL:  res = a >> b[4:0];
      OP_ADDI: res = a + disp.imm;
      OP_LUI:  res = {disp.imm[15:0], 16'd0};
      OP_MFC:  res = a;
      default: res = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_valid <= 1'b0;
      req_tag   <= '0;
      req_data  <= '0;
    end else begin
      if (grant) req_valid <= 1'b0;
      if (disp_valid) begin
        req_valid <= 1'b1;
        req_tag   <= disp.tag;
        req_data  <= VLEN'(res);
      end
    end
  end
endmodule
