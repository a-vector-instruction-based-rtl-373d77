// vrisc_pkg: types and constants shared by the vector-extended out-of-order RISC core.
//
// The core is a Tomasulo machine: every reservation-station entry and every load-buffer
// entry owns a unique result tag, and each result is broadcast once on the common data bus
// (CDB) as {tag, value}. Tag 0 means "value present". Operands are carried as 128-bit
// values so that scalar (32-bit, in the low bits) and vector (4x4 bytes or 4x32-bit lanes)
// results share one bus.
//
// The instruction set is this design's own: the six vector instructions (4x4SAD, SATD,
// 4x4RD, 4x4RD2, NAC, NAC2) and the units and buffers follow the architecture being
// implemented, while the encoding, the scalar instruction list and all widths are chosen here.
//
// Instruction word (32 bits):
//   [31:26] opcode  [25:21] rd / vd  [20:16] rs1 / vs1  [15:11] rs2 / vs2  [15:0] imm16
// Vector register numbers use the low 4 bits of a register field.
package vrisc_pkg;

  localparam int XLEN   = 32;   // scalar width
  localparam int VLEN   = 128;  // vector register width: 16 pixels of 8 bits, or 4 lanes of 32 bits
  localparam int NGREG  = 32;   // general registers
  localparam int NVREG  = 16;   // vector registers
  localparam int TAGW   = 4;    // result-tag width (tag 0 = no pending producer)
  localparam int RS_DEPTH = 3;  // entries per reservation station
  localparam int LB_DEPTH = 3;  // load buffer entries
  localparam int SB_DEPTH = 3;  // store buffer entries

  // Tag ranges owned by the producers
  localparam logic [TAGW-1:0] TAG_GEU  = 4'd1;   // 1..3
  localparam logic [TAGW-1:0] TAG_VEU1 = 4'd4;   // 4..6
  localparam logic [TAGW-1:0] TAG_VEU2 = 4'd7;   // 7..9
  localparam logic [TAGW-1:0] TAG_LB   = 4'd10;  // 10..12

  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    OP_ADD   = 6'd1,  OP_SUB  = 6'd2,  OP_AND  = 6'd3,  OP_OR   = 6'd4,
    OP_XOR   = 6'd5,  OP_SLT  = 6'd6,  OP_SLL  = 6'd7,  OP_SRL  = 6'd8,
    OP_ADDI  = 6'd9,  OP_LUI  = 6'd10,
    OP_LW    = 6'd11, OP_SW   = 6'd12,
    OP_BEQ   = 6'd13, OP_BNE  = 6'd14, OP_JMP  = 6'd15, OP_HALT = 6'd16,
    OP_MFC   = 6'd17,               // rd <- control register imm[1:0]
    OP_LD4X4 = 6'd20,               // 4x4RD : vd <- 4 rows of 4 adjacent bytes, row pitch rs2
    OP_LD4X4_2 = 6'd21,             // 4x4RD2: vd <- 4 rows of 4 bytes spaced 4 apart, row pitch rs2
    OP_SAD   = 6'd22,               // 4x4SAD: rd <- sum |vs1 - vs2|
    OP_SATD  = 6'd23,               // SATD  : rd <- sum |H (vs1 - vs2) H|
    OP_NAC   = 6'd24,               // NAC   : vd <- {pOrig, pRef} integer-pel pointers
    OP_NAC2  = 6'd25,               // NAC2  : vd <- {pOrig, pRef} quarter-pel pointers
    OP_VINS  = 6'd26,               // vd <- vs1 with 32-bit lane imm[1:0] replaced by rs2
    OP_VEXT  = 6'd27                // rd <- 32-bit lane imm[1:0] of vs1
  } op_e;

  typedef struct packed {
    logic [TAGW-1:0] tag;   // 0: val is valid
    logic [VLEN-1:0] val;
  } operand_t;

  // Request written into a reservation station or buffer entry at issue
  typedef struct packed {
    op_e             op;
    operand_t        a;
    operand_t        b;
    logic [XLEN-1:0] imm;
  } rs_req_t;

  // Operation handed from a reservation station to its functional unit
  typedef struct packed {
    op_e             op;
    logic [VLEN-1:0] a;
    logic [VLEN-1:0] b;
    logic [XLEN-1:0] imm;
    logic [TAGW-1:0] tag;
  } fu_op_t;

  typedef struct packed {
    logic            valid;
    logic [TAGW-1:0] tag;
    logic [VLEN-1:0] data;
  } cdb_t;

  // Instruction field helpers
  function automatic op_e    f_op (logic [31:0] i); return op_e'(i[31:26]); endfunction
  function automatic logic [4:0] f_rd (logic [31:0] i); return i[25:21]; endfunction
  function automatic logic [4:0] f_rs1(logic [31:0] i); return i[20:16]; endfunction
  function automatic logic [4:0] f_rs2(logic [31:0] i); return i[15:11]; endfunction
  function automatic logic [31:0] f_simm(logic [31:0] i); return {{16{i[15]}}, i[15:0]}; endfunction

  function automatic logic [31:0] enc_r(op_e op, int rd, int rs1, int rs2);
    return {op, 5'(rd), 5'(rs1), 5'(rs2), 11'd0};
  endfunction
  function automatic logic [31:0] enc_i(op_e op, int rd, int rs1, int imm);
    return {op, 5'(rd), 5'(rs1), 16'(imm)};
  endfunction

  function automatic logic vec_op(op_e op);
    return op inside {OP_SAD, OP_SATD, OP_NAC, OP_NAC2, OP_VINS, OP_VEXT};
  endfunction

endpackage
