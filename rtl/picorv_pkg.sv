// picorv_pkg - shared encodings of the picoRISC-V single-cycle CPU.
//
// picoRISC-V is an 11-instruction subset of RV32I: lw, sw, add, addi, sub,
// and, or, slt, beq, jal, jalr. This package holds the opcode and funct
// values of that subset (standard RV32I encodings), the operation code of
// the ALU, the immediate-format selector of the Immediate Decoder and the
// control word that the control unit hands to the datapath.
//
// The opcode/funct values are those of RV32I. The numeric codes of
// alu_op_e and imm_ctrl_e are this design's own choice; only their names
// (ALUControl, ImmControl) and meanings come from the architecture.
package picorv_pkg;

  localparam int unsigned XLEN  = 32;   // register and data width
  localparam int unsigned NREGS = 32;   // x0..x31

  // opcodes (inst[6:0])
  localparam logic [6:0] OP_R      = 7'b0110011;  // add, sub, slt, or, and
  localparam logic [6:0] OP_IMM    = 7'b0010011;  // addi
  localparam logic [6:0] OP_LOAD   = 7'b0000011;  // lw
  localparam logic [6:0] OP_STORE  = 7'b0100011;  // sw
  localparam logic [6:0] OP_BRANCH = 7'b1100011;  // beq
  localparam logic [6:0] OP_JAL    = 7'b1101111;  // jal
  localparam logic [6:0] OP_JALR   = 7'b1100111;  // jalr

  // funct3 values
  localparam logic [2:0] F3_ADD_SUB = 3'b000;
  localparam logic [2:0] F3_SLT     = 3'b010;
  localparam logic [2:0] F3_OR      = 3'b110;
  localparam logic [2:0] F3_AND     = 3'b111;
  localparam logic [2:0] F3_WORD    = 3'b010;   // lw, sw
  localparam logic [2:0] F3_BEQ     = 3'b000;
  localparam logic [2:0] F3_JALR    = 3'b000;
  localparam logic [2:0] F3_ADDI    = 3'b000;

  // funct7 values
  localparam logic [6:0] F7_BASE = 7'b0000000;
  localparam logic [6:0] F7_SUB  = 7'b0100000;

  // ALU operation (ALUControl)
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_SLT = 3'd4
  } alu_op_e;

  // immediate format (ImmControl)
  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_U = 3'd3,
    IMM_J = 3'd4
  } imm_ctrl_e;

  // control word from the control unit to the datapath
  typedef struct packed {
    logic      alu_src;      // ALUSrc: 1 = SrcB is the immediate, 0 = [rs2]
    alu_op_e   alu_control;  // ALUControl
    logic      mem_write;    // MemWrite
    logic      mem_to_reg;   // MemToReg: 1 = write back ReadData
    logic      reg_write;    // RegWrite
    logic      branch_beq;   // BranchBeq
    logic      branch_jal;   // BranchJal
    logic      branch_jalr;  // BranchJalr
    imm_ctrl_e imm_control;  // ImmControl
  } ctrl_t;

endpackage
