// vec_exec_unit: Vector Instruction Execution Unit (the core instantiates two of them).
//
// A res_station feeds one of the vector datapaths: 4x4SAD (sad4x4), SATD (satd4x4), NAC and
// NAC2 (nac_unit), plus VINS / VEXT, which move a 32-bit lane between a vector and a general
// register so that NAC operands and pointers can be exchanged with scalar code. Each vector
// instruction executes in a single cycle, as the architecture assumes for its dedicated
// hardware; the result is held in a result register until the common data bus grants it.
// SAD, SATD and VEXT produce a scalar (low 32 bits), the others a 128-bit vector.
// Both units implement the full vector operation set; which unit gets an instruction is
// decided at issue. VINS/VEXT and the identical units are this design's choices.
module vec_exec_unit
  import vrisc_pkg::*;
#(
  parameter logic [TAGW-1:0] TAG_BASE = TAG_VEU1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            alloc_valid,
  input  rs_req_t         alloc_req,
  output logic            full,
  output logic [TAGW-1:0] alloc_tag,
  output logic            busy_any,
  input  cdb_t            cdb,
  output logic            req_valid,
  output logic [TAGW-1:0] req_tag,
  output logic [VLEN-1:0] req_data,
  input  logic            grant
);
  logic   fu_ready, disp_valid;
  fu_op_t disp;
  logic [31:0]  sad_res, satd_res;
  logic [127:0] nac_res, res;

  assign fu_ready = !req_valid || grant;

  res_station #(.DEPTH(RS_DEPTH), .TAG_BASE(TAG_BASE)) u_rs (
    .clk, .rst_n, .alloc_valid, .alloc_req, .full, .alloc_tag, .busy_any,
    .cdb, .fu_ready, .disp_valid, .disp
  );

  sad4x4   u_sad  (.blk_a(disp.a), .blk_b(disp.b), .sad(sad_res));
  satd4x4  u_satd (.blk_a(disp.a), .blk_b(disp.b), .satd(satd_res));
  nac_unit u_nac  (.sub_pel(disp.op == OP_NAC2), .a(disp.a), .b(disp.b), .y_out(nac_res));

  always_comb begin
    unique case (disp.op)
      OP_SAD:  res = 128'(sad_res);
      OP_SATD: res = 128'(satd_res);
      OP_NAC, OP_NAC2: res = nac_res;
      OP_VINS: begin
        res = disp.a;
        res[32*disp.imm[1:0] +: 32] = disp.b[31:0];
      end
      OP_VEXT: res = 128'(disp.a[32*disp.imm[1:0] +: 32]);
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
        req_data  <= res;
      end
    end
  end
endmodule
