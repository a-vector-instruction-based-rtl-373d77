// tb_gen_exec_unit: issues random scalar operations with ready operands and grants the bus
// at once; checks each result against a software ALU and that it is ready one cycle after
// issue reaches the unit (dispatch in the cycle after allocation, result the cycle after).
module tb_gen_exec_unit;
  import vrisc_pkg::*;
  logic clk = 0, rst_n = 0, alloc_valid = 0, full, busy_any, req_valid, grant;
  rs_req_t alloc_req;
  logic [TAGW-1:0] alloc_tag, req_tag;
  logic [VLEN-1:0] req_data;
  cdb_t cdb;
  int checks = 0, failures = 0;

  gen_exec_unit #(.TAG_BASE(TAG_GEU)) dut (.*);
  always #5 clk = ~clk;
  assign grant = req_valid;
  assign cdb = '{valid: req_valid, tag: req_tag, data: req_data};

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] alu(op_e op, logic [31:0] a, logic [31:0] b, logic [31:0] imm);
    case (op)
      OP_ADD: return a + b;   OP_SUB: return a - b;   OP_AND: return a & b;
      OP_OR:  return a | b;   OP_XOR: return a ^ b;
      OP_SLT: return ($signed(a) < $signed(b)) ? 1 : 0;
      OP_SLL: return a << (b % 32);  OP_SRL: return a >> (b % 32);
      OP_ADDI: return a + imm;  OP_LUI: return imm << 16;  OP_MFC: return a;
      default: return 0;
    endcase
  endfunction

  initial begin
    op_e ops [11] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL, OP_ADDI, OP_LUI, OP_MFC};
    alloc_req = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [31:0] a, b, imm;
      logic [TAGW-1:0] t;
      int lat;
      op_e op;
      op = ops[$urandom_range(0, 10)];
      a = $urandom; b = $urandom; imm = (op == OP_LUI) ? 32'($urandom_range(0, 65535)) : $urandom;
      @(negedge clk);
      alloc_valid = 1; t = alloc_tag;
      alloc_req = '{op: op, a: '{tag: '0, val: VLEN'(a)}, b: '{tag: '0, val: VLEN'(b)}, imm: imm};
      @(negedge clk); alloc_valid = 0;
      lat = 0;
      while (!req_valid && lat < 10) begin @(negedge clk); lat++; end
      checks += 3;
      if (lat != 1) begin failures++; $display("FAIL latency %0d", lat); end
      if (req_tag != t) begin failures++; $display("FAIL tag"); end
      if (req_data != VLEN'(alu(op, a, b, imm))) begin failures++; $display("FAIL %s", op.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
